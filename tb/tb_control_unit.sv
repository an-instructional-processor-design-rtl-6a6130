// tb_control_unit: runs the control unit with a fixed instruction in IR and
// measures how many clock cycles pass from T0 until the step counter returns
// to T0. Checks the published four-cycle MOVE Rs,Rd (fetch T0..T2, execute
// T3), the other instruction lengths, that HALT freezes the unit with
// halted high, and that reset restarts it.
module tb_control_unit;
  import ip_pkg::*;
  logic clk = 0, reset, halted;
  instr_t ir;
  status_t status;
  ctrl_t ctrl;
  logic [2:0] step;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .reset, .ir, .status, .ctrl, .step, .halted);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(opcode_t op, int sm, int dm);
    instr_t w;
    w = '0; w.op = op; w.src_mode = 2'(sm); w.dst_mode = 1'(dm); w.value = 6'd5;
    return w;
  endfunction

  task automatic measure(input instr_t w, input int exp_cycles, input string id);
    int n;
    ir = w; reset = 1; @(posedge clk); #1; reset = 0;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (step != 0 && n < 20);
    checks++;
    if (n != exp_cycles) begin failures++; $display("FAIL %s took %0d cycles exp %0d", id, n, exp_cycles); end
  endtask

  initial begin
    status = '0; reset = 1; ir = '0;
    measure(mk(OP_MOVE, 0, 0), 4, "MOVE Rs,Rd");
    measure(mk(OP_ADD, 2, 0), 4, "ADD #v,Rd");
    measure(mk(OP_ADD, 1, 0), 6, "ADD (Rs),Rd");
    measure(mk(OP_MOVE, 3, 0), 6, "MOVE v,Rd");
    measure(mk(OP_MOVE, 0, 1), 7, "MOVE Rs,v");
    measure(mk(OP_ROTL, 1, 1), 8, "ROTL (Rs),v");
    measure(mk(OP_AND, 3, 1), 7, "AND v,v");
    measure(mk(OP_BGTZ, 0, 0), 4, "BGTZ");
    measure(mk(OP_BRA, 0, 0), 4, "BRA");
    // HALT: runs T0..T3 then freezes
    ir = mk(OP_HALT, 0, 0); reset = 1; @(posedge clk); #1; reset = 0;
    repeat (12) @(posedge clk);
    #1;
    checks++;
    if (!halted || step != 3) begin failures++; $display("FAIL HALT halted=%b step=%0d", halted, step); end
    reset = 1; @(posedge clk); #1; reset = 0;
    checks++;
    if (halted || step != 0) begin failures++; $display("FAIL reset after HALT"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
