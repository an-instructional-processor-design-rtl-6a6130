// tb_ir_reg: checks reset, load and hold of the instruction register and the
// field split of a few known instruction words (MOVE #3,R1 = 1043h,
// MOVE R1,R2 = 0280h, HALT = E000h).
module tb_ir_reg;
  import ip_pkg::*;
  logic clk = 0, reset, load_ir;
  logic [15:0] d, model;
  instr_t ir;
  int checks = 0, failures = 0;

  ir_reg dut (.clk, .reset, .load_ir, .d, .ir);
  always #5 clk = ~clk;

  task automatic load_word(input logic [15:0] w);
    load_ir = 1; d = w; @(posedge clk); #1; load_ir = 0; model = w;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load_ir = 0; d = 16'hFFFF;
    @(posedge clk); #1; reset = 0;
    checks++; if (ir !== 16'h0000) begin failures++; $display("FAIL reset"); end
    load_word(16'h1043);
    checks++;
    if (ir.op !== OP_MOVE || ir.src_mode !== 2'b10 || ir.dst_mode !== 1'b0 || ir.dst_reg !== 2'd1 || ir.value !== 6'd3) begin
      failures++; $display("FAIL 1043 fields");
    end
    load_word(16'h0280);
    checks++;
    if (ir.op !== OP_MOVE || ir.src_mode !== 2'b00 || ir.src_reg !== 2'd1 || ir.dst_reg !== 2'd2) begin
      failures++; $display("FAIL 0280 fields");
    end
    load_word(16'hE000);
    checks++; if (ir.op !== OP_HALT) begin failures++; $display("FAIL E000"); end
    repeat (300) begin
      load_ir = 1'($urandom); d = 16'($urandom);
      @(posedge clk); if (load_ir) model = d; #1;
      checks++; if (ir !== model) begin failures++; $display("FAIL %h exp %h", ir, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
