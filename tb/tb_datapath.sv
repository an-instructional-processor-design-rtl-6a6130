// tb_datapath: drives the data path with hand-written control words (no
// control unit) and checks the register transfers. It fetches and executes
// MOVE #3,R1 and MOVE R1,R2 with the published fetch and MOVE control
// words, adds R1 to R2, writes R2 to memory and to PORTB through MAR/MDR,
// reads the word back through MDR, and takes a relative branch
// PC <- PC + sext(DISP). Register contents are read hierarchically.
module tb_datapath;
  import ip_pkg::*;
  logic clk = 0, reset;
  ctrl_t ctrl;
  logic [7:0] porta_in, portb_out;
  instr_t ir;
  status_t status;
  logic [5:0] pc;
  int checks = 0, failures = 0;

  datapath dut (.clk, .reset, .ctrl, .porta_in, .portb_out, .ir, .status, .pc);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input ctrl_t w);
    ctrl = w; @(posedge clk); #1; ctrl = CTRL_IDLE;
  endtask

  task automatic fetch;
    ctrl_t w;
    w = CTRL_IDLE; w.pc_to_b = 1; w.alu_op = ALU_PASS_B; w.load_mar = 1; w.inc_pc = 1; apply(w);
    w = CTRL_IDLE; w.mem_read = 1; w.load_mdr = 1; apply(w);
    w = CTRL_IDLE; w.mdr_to_b = 1; w.alu_op = ALU_PASS_B; w.load_ir = 1; apply(w);
  endtask

  task automatic expect16(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %h exp %h", what, got, exp); end
  endtask

  initial begin
    ctrl_t w;
    ctrl = CTRL_IDLE; porta_in = 8'h5A; reset = 1;
    #1;
    dut.u_mem.mem[0] = 16'h1043;   // MOVE #3,R1
    dut.u_mem.mem[1] = 16'h0280;   // MOVE R1,R2
    dut.u_mem.mem[2] = 16'hC03E;   // BGTZ -2
    @(posedge clk); #1; reset = 0;
    fetch();
    expect16(ir, 16'h1043, "IR after fetch 1");
    expect16(16'(pc), 16'd1, "PC after fetch 1");
    w = CTRL_IDLE; w.extend = 1; w.alu_op = ALU_PASS_A; w.regs_write = 1; w.load_status = 1; apply(w);
    expect16(dut.u_regs.r[1], 16'd3, "R1");
    expect16(16'(status), 16'b0000, "NZVC after MOVE #3");
    fetch();
    expect16(ir, 16'h0280, "IR after fetch 2");
    w = CTRL_IDLE; w.regs_read1 = 1; w.alu_op = ALU_PASS_A; w.load_status = 1; w.regs_write = 1; apply(w);
    expect16(dut.u_regs.r[2], 16'd3, "R2");
    // R2 <- R1 + R2
    w = CTRL_IDLE; w.regs_read1 = 1; w.regs_read2 = 1; w.alu_op = ALU_ADD; w.regs_write = 1; w.load_status = 1; apply(w);
    expect16(dut.u_regs.r[2], 16'd6, "R2 after ADD");
    // MDR <- R2 (read port 2 on BUS B), MAR <- R1 + R2 (= 9), MEM(MAR) <- MDR
    w = CTRL_IDLE; w.regs_read2 = 1; w.alu_op = ALU_PASS_B; w.load_mdr = 1; apply(w);
    w = CTRL_IDLE; w.regs_read1 = 1; w.regs_read2 = 1; w.alu_op = ALU_ADD; w.load_mar = 1; apply(w);
    w = CTRL_IDLE; w.mem_write = 1; apply(w);
    expect16(dut.u_mem.mem[9], 16'd6, "MEM[9]");
    // MAR <- NOT(idle BUS A) = 63 (PORTB), MEM(MAR) <- MDR reaches the port
    w = CTRL_IDLE; w.alu_op = ALU_INV; w.load_mar = 1; apply(w);
    w = CTRL_IDLE; w.mem_write = 1; apply(w);
    expect16(16'(portb_out), 16'h0006, "PORTB");
    checks++;
    if (dut.u_mem.mem[63] !== 16'h0000) begin failures++; $display("FAIL port write reached RAM"); end
    // MDR <- 0, then read the PORTB location back
    w = CTRL_IDLE; w.alu_op = ALU_PASS_A; w.load_mdr = 1; apply(w);
    expect16(dut.u_mdr.mdr, 16'h0000, "MDR cleared");
    w = CTRL_IDLE; w.mem_read = 1; w.load_mdr = 1; apply(w);
    expect16(dut.u_mdr.mdr, 16'h0006, "PORTB read back");
    // MAR <- R1 + MDR (= 9), MDR <- 0, MDR <- MEM(MAR)
    w = CTRL_IDLE; w.regs_read1 = 1; w.mdr_to_b = 1; w.alu_op = ALU_ADD; w.load_mar = 1; apply(w);
    w = CTRL_IDLE; w.alu_op = ALU_PASS_A; w.load_mdr = 1; apply(w);
    w = CTRL_IDLE; w.mem_read = 1; w.load_mdr = 1; apply(w);
    expect16(dut.u_mdr.mdr, 16'd6, "MEM[9] read back");
    // R(A2) <- MDR through BUS A
    w = CTRL_IDLE; w.mdr_to_a = 1; w.alu_op = ALU_PASS_A; w.regs_write = 1; apply(w);
    expect16(dut.u_regs.r[2], 16'd6, "R(A2) from MDR");
    // branch: fetch BGTZ -2 at 2, PC becomes 3, then PC <- PC + sext(-2) = 1
    fetch();
    expect16(ir, 16'hC03E, "IR BGTZ");
    w = CTRL_IDLE; w.extend = 1; w.pc_to_b = 1; w.alu_op = ALU_ADD; w.load_pc = 1; apply(w);
    expect16(16'(pc), 16'd1, "PC after branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
