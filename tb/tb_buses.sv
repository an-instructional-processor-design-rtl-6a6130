// tb_buses: checks every legal driver choice of BUS A (none, REGS port 1,
// MDR) and BUS B (none, PC zero-extended, REGS port 2, MDR).
module tb_buses;
  logic clk = 0;
  logic regs_read1, mdr_to_a, pc_to_b, regs_read2, mdr_to_b;
  logic [15:0] r1, r2, mdr, bus_a, bus_b, ea, eb;
  logic [5:0]  pc;
  int checks = 0, failures = 0;

  buses dut (.clk, .regs_read1, .mdr_to_a, .pc_to_b, .regs_read2, .mdr_to_b,
             .regs_rdata1(r1), .regs_rdata2(r2), .mdr, .pc, .bus_a, .bus_b);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) begin
      int sa, sb;
      sa = $urandom % 3; sb = $urandom % 4;
      r1 = 16'($urandom); r2 = 16'($urandom); mdr = 16'($urandom); pc = 6'($urandom);
      regs_read1 = (sa == 1); mdr_to_a = (sa == 2);
      pc_to_b = (sb == 1); regs_read2 = (sb == 2); mdr_to_b = (sb == 3);
      ea = (sa == 1) ? r1 : (sa == 2) ? mdr : 16'h0;
      eb = (sb == 1) ? {10'h0, pc} : (sb == 2) ? r2 : (sb == 3) ? mdr : 16'h0;
      #1;
      checks++;
      if (bus_a !== ea || bus_b !== eb) begin
        failures++; $display("FAIL sa=%0d sb=%0d a=%h b=%h", sa, sb, bus_a, bus_b);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
