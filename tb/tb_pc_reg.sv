// tb_pc_reg: checks reset to 0, increment with wrap from 63 to 0, load from
// BUS C, load priority and hold, against a counter model.
module tb_pc_reg;
  logic clk = 0, reset, load_pc, inc_pc;
  logic [5:0] d, pc, model;
  int checks = 0, failures = 0;

  pc_reg dut (.clk, .reset, .load_pc, .inc_pc, .d, .pc);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load_pc = 0; inc_pc = 0; d = 6'h2A;
    @(posedge clk); #1;
    reset = 0; model = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset %h", pc); end
    inc_pc = 1;
    repeat (70) begin
      @(posedge clk); model = model + 1; #1;
      checks++; if (pc !== model) begin failures++; $display("FAIL inc %h exp %h", pc, model); end
    end
    repeat (500) begin
      load_pc = 1'($urandom); inc_pc = 1'($urandom); d = 6'($urandom);
      @(posedge clk);
      if (load_pc) model = d; else if (inc_pc) model = model + 1;
      #1;
      checks++; if (pc !== model) begin failures++; $display("FAIL %h exp %h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
