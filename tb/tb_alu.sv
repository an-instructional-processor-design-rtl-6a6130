// tb_alu: self-checking test of the ALU. Every operation is applied to
// corner values and random operands; result and NZVC flags are compared with
// values computed here from integer arithmetic.
module tb_alu;
  import ip_pkg::*;
  logic [15:0] a, b, r;
  alu_op_t     op;
  status_t     f;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .r, .flags(f));

  task automatic check_one(input logic [15:0] ta, input logic [15:0] tb_, input alu_op_t top);
    logic [15:0] er;
    logic ev, ec;
    int signed sa, sb, ss;
    a = ta; b = tb_; op = top;
    #1;
    ev = 0; ec = 0;
    sa = int'($signed(ta)); sb = int'($signed(tb_));
    case (top)
      ALU_PASS_A: er = ta;
      ALU_PASS_B: er = tb_;
      ALU_ADD: begin
        er = 16'((int'(ta) + int'(tb_)) % 65536);
        ec = (int'(ta) + int'(tb_)) > 65535;
        ss = sa + sb;
        ev = (ss > 32767) || (ss < -32768);
      end
      ALU_AND:  er = ta & tb_;
      ALU_INV:  er = 16'hFFFF ^ ta;
      ALU_ROTL: begin er = 16'((int'(ta) * 2) % 65536) | 16'(int'(ta) / 32768); ec = ta >= 16'h8000; end
      default:  er = 'x;
    endcase
    checks++;
    if (r !== er || f.n !== er[15] || f.z !== (er == 0) || f.v !== ev || f.c !== ec) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h r=%h exp=%h nzvc=%b%b%b%b exp_vc=%b%b", top.name(), ta, tb_, r, er,
               f.n, f.z, f.v, f.c, ev, ec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_t ops[6] = '{ALU_PASS_A, ALU_PASS_B, ALU_ADD, ALU_AND, ALU_INV, ALU_ROTL};
    foreach (ops[k]) begin
      check_one(16'h0000, 16'h0000, ops[k]);
      check_one(16'h7FFF, 16'h0001, ops[k]);
      check_one(16'hFFFF, 16'h0001, ops[k]);
      check_one(16'h8000, 16'h8000, ops[k]);
      check_one(16'h0003, 16'hFFFF, ops[k]);
      repeat (200) check_one(16'($urandom), 16'($urandom), ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
