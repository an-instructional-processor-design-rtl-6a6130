// tb_move_trace: cycle-by-cycle trace of the three-instruction program
// MOVE #3,R1 / MOVE R1,R2 / HALT (1043h, 0280h, E000h) on the full
// processor at its default parameters. In every clock cycle it compares the
// step number, PC, IR, Inc_PC, Load_IR, Load_PC, REGS_Read1, REGS_Write, the
// ALU A input and the sign-extension select with the values expected from
// the fetch table (T0..T2) and the two MOVE execute steps, and checks that
// the processor halts after exactly 12 cycles with R1 = R2 = 3.
module tb_move_trace;
  import ip_pkg::*;
  logic clk = 0, reset = 1;
  logic [7:0] porta_in = 8'h00, portb_out;
  logic halted;
  int checks = 0, failures = 0;

  processor dut (.clk, .reset, .porta_in, .portb_out, .halted);
  always #50 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input int cyc, input int st, input int pc, input logic [15:0] ir,
                              input bit inc, input bit ldir, input bit rd1, input bit wr,
                              input bit ext, input bit chk_a, input logic [15:0] alu_a);
    checks++;
    if (dut.u_cu.step !== 3'(st) || dut.u_dp.pc !== 6'(pc) || dut.u_dp.ir !== ir ||
        dut.ctrl.inc_pc !== inc || dut.ctrl.load_ir !== ldir || dut.ctrl.load_pc !== 1'b0 ||
        dut.ctrl.regs_read1 !== rd1 || dut.ctrl.regs_write !== wr || dut.ctrl.extend !== ext ||
        (chk_a && dut.u_dp.alu_a !== alu_a)) begin
      failures++;
      $display("FAIL cycle %0d: step=%0d pc=%0d ir=%h inc=%b ldir=%b rd1=%b wr=%b ext=%b alu_a=%h",
               cyc, dut.u_cu.step, dut.u_dp.pc, dut.u_dp.ir, dut.ctrl.inc_pc, dut.ctrl.load_ir,
               dut.ctrl.regs_read1, dut.ctrl.regs_write, dut.ctrl.extend, dut.u_dp.alu_a);
    end
  endtask

  initial begin
    #1;
    for (int k = 0; k < 64; k++) dut.u_dp.u_mem.mem[k] = 16'h0000;
    dut.u_dp.u_mem.mem[0] = 16'h1043;
    dut.u_dp.u_mem.mem[1] = 16'h0280;
    dut.u_dp.u_mem.mem[2] = 16'hE000;
    @(posedge clk); #1; reset = 0;
    // instruction 1: MOVE #3,R1
    expect_cycle(0, 0, 0, 16'h0000, 1, 0, 0, 0, 0, 1, 16'h0000);
    @(posedge clk); #1;
    expect_cycle(1, 1, 1, 16'h0000, 0, 0, 0, 0, 0, 0, 16'h0000);
    @(posedge clk); #1;
    expect_cycle(2, 2, 1, 16'h0000, 0, 1, 0, 0, 0, 0, 16'h0000);
    @(posedge clk); #1;
    expect_cycle(3, 3, 1, 16'h1043, 0, 0, 0, 1, 1, 1, 16'h0003);
    // instruction 2: MOVE R1,R2
    @(posedge clk); #1;
    expect_cycle(4, 0, 1, 16'h1043, 1, 0, 0, 0, 0, 1, 16'h0000);
    @(posedge clk); #1;
    expect_cycle(5, 1, 2, 16'h1043, 0, 0, 0, 0, 0, 0, 16'h0000);
    @(posedge clk); #1;
    expect_cycle(6, 2, 2, 16'h1043, 0, 1, 0, 0, 0, 0, 16'h0000);
    @(posedge clk); #1;
    expect_cycle(7, 3, 2, 16'h0280, 0, 0, 1, 1, 0, 1, 16'h0003);
    // instruction 3: HALT
    @(posedge clk); #1;
    expect_cycle(8, 0, 2, 16'h0280, 1, 0, 0, 0, 0, 1, 16'h0000);
    @(posedge clk); #1;
    @(posedge clk); #1;
    expect_cycle(10, 2, 3, 16'h0280, 0, 1, 0, 0, 0, 0, 16'h0000);
    @(posedge clk); #1;
    checks++;
    if (dut.u_dp.ir !== 16'hE000 || dut.ctrl.stop !== 1'b1 || halted) begin failures++; $display("FAIL HALT step"); end
    @(posedge clk); #1;
    checks++;
    if (!halted) begin failures++; $display("FAIL not halted after 12 cycles"); end
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (!halted || dut.u_dp.pc !== 6'd3 || dut.u_cu.step !== 3'd3) begin failures++; $display("FAIL halt not held"); end
    checks++;
    if (dut.u_dp.u_regs.r[1] !== 16'd3 || dut.u_dp.u_regs.r[2] !== 16'd3 || dut.u_dp.u_regs.r[0] !== 16'd0)
      begin failures++; $display("FAIL registers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
