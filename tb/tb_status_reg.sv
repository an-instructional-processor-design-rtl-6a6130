// tb_status_reg: checks reset, load and hold of the NZVC STATUS register
// against a reference copy kept by the testbench.
module tb_status_reg;
  import ip_pkg::*;
  logic clk = 0, reset, load_status;
  status_t flags_in, status, model;
  int checks = 0, failures = 0;

  status_reg dut (.clk, .reset, .load_status, .flags_in, .status);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load_status = 0; flags_in = '1;
    @(posedge clk); #1;
    reset = 0; model = '0;
    checks++; if (status !== 4'b0000) begin failures++; $display("FAIL reset"); end
    repeat (300) begin
      load_status = 1'($urandom); flags_in = status_t'($urandom);
      @(posedge clk);
      if (load_status) model = flags_in;
      #1;
      checks++;
      if (status !== model) begin failures++; $display("FAIL got %b exp %b", status, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
