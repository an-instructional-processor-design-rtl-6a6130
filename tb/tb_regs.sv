// tb_regs: random writes and reads of the four-word register file, compared
// with a model array; both read ports are checked every cycle, including a
// read of the register written in the same cycle (old value until the edge).
module tb_regs;
  logic clk = 0, reset, regs_write;
  logic [1:0]  a1, a2;
  logic [15:0] wdata, rdata1, rdata2;
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  regs dut (.clk, .reset, .a1, .a2, .regs_write, .wdata, .rdata1, .rdata2);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; regs_write = 0; a1 = 0; a2 = 0; wdata = 0;
    @(posedge clk); #1;
    reset = 0;
    for (int k = 0; k < 4; k++) model[k] = 0;
    repeat (1000) begin
      a1 = 2'($urandom); a2 = 2'($urandom); wdata = 16'($urandom); regs_write = 1'($urandom);
      #1;
      checks++;
      if (rdata1 !== model[a1] || rdata2 !== model[a2]) begin
        failures++; $display("FAIL a1=%0d a2=%0d r1=%h r2=%h", a1, a2, rdata1, rdata2);
      end
      @(posedge clk);
      if (regs_write) model[a2] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
