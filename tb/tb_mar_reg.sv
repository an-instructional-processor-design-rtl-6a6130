// tb_mar_reg: checks reset, load and hold of the memory address register.
module tb_mar_reg;
  logic clk = 0, reset, load_mar;
  logic [5:0] d, mar, model;
  int checks = 0, failures = 0;

  mar_reg dut (.clk, .reset, .load_mar, .d, .mar);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load_mar = 0; d = 6'h3F;
    @(posedge clk); #1; reset = 0; model = 0;
    checks++; if (mar !== 0) begin failures++; $display("FAIL reset"); end
    repeat (400) begin
      load_mar = 1'($urandom); d = 6'($urandom);
      @(posedge clk); if (load_mar) model = d; #1;
      checks++; if (mar !== model) begin failures++; $display("FAIL %h exp %h", mar, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
