// tb_mdr_reg: checks that MDR loads the memory word when mem_read is high,
// BUS C when it is low, and holds without load_mdr.
module tb_mdr_reg;
  logic clk = 0, reset, load_mdr, mem_read;
  logic [15:0] mem_data, bus_c, mdr, model;
  int checks = 0, failures = 0;

  mdr_reg dut (.clk, .reset, .load_mdr, .mem_read, .mem_data, .bus_c, .mdr);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load_mdr = 0; mem_read = 0; mem_data = 1; bus_c = 2;
    @(posedge clk); #1; reset = 0; model = 0;
    checks++; if (mdr !== 0) begin failures++; $display("FAIL reset"); end
    repeat (400) begin
      load_mdr = 1'($urandom); mem_read = 1'($urandom);
      mem_data = 16'($urandom); bus_c = 16'($urandom);
      @(posedge clk);
      if (load_mdr) model = mem_read ? mem_data : bus_c;
      #1;
      checks++; if (mdr !== model) begin failures++; $display("FAIL %h exp %h", mdr, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
