// tb_alu_a_mux: checks that ALU input A is BUS A with extend low and the
// sign-extended 6-bit VALUE with extend high, for all 64 VALUE codes.
module tb_alu_a_mux;
  logic [15:0] bus_a, alu_a;
  logic [5:0]  value;
  logic        extend;
  int checks = 0, failures = 0;

  alu_a_mux dut (.bus_a, .value, .extend, .alu_a);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int signed sv;
      bus_a = 16'($urandom); value = 6'(v);
      sv = (v >= 32) ? v - 64 : v;
      extend = 1'b1; #1;
      checks++;
      if (alu_a !== 16'(sv)) begin failures++; $display("FAIL ext v=%0d got %h", v, alu_a); end
      extend = 1'b0; #1;
      checks++;
      if (alu_a !== bus_a) begin failures++; $display("FAIL bus v=%0d got %h", v, alu_a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
