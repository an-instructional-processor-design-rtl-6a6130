// tb_ctrl_decoders: exhaustive check of the step, instruction, source mode
// and destination mode decoders: each output is one-hot at the input value.
module tb_ctrl_decoders;
  import ip_pkg::*;
  logic [2:0] step;
  instr_t ir;
  logic [7:0] t, i;
  logic [3:0] s;
  logic [1:0] d;
  int checks = 0, failures = 0;

  ctrl_decoders dut (.step, .ir, .t, .i, .s, .d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int st = 0; st < 8; st++)
      for (int w = 0; w < 65536; w += 509) begin
        step = 3'(st); ir = instr_t'(16'(w));
        #1;
        checks++;
        if (t !== 8'(1 << st) || i !== 8'(1 << w[15:13]) || s !== 4'(1 << w[12:11]) || d !== 2'(1 << w[8])) begin
          failures++; $display("FAIL st=%0d w=%h t=%b i=%b s=%b d=%b", st, w, t, i, s, d);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
