// alu: 16-bit arithmetic logic unit of the instructional processor.
//
// Combinational. Input A comes from the ALU input multiplexer (BUS A or the
// sign-extended IR VALUE field), input B from BUS B; the result R drives
// BUS C. Operations: Pass_A and Pass_B (named in the fetch and MOVE
// sequences), ADD (the ADD and branch instructions), and the microcontroller
// additions AND, INV (bitwise NOT of A) and ROTL (rotate A left by one bit).
// Flags NZVC go to the STATUS register. N and Z follow the result for every
// operation. V and C are the two's complement overflow and carry-out of ADD;
// for ROTL, C is the bit rotated from bit 15 into bit 0; otherwise V and C
// are 0. The flag rules besides N and Z, and the exact meaning of INV and
// ROTL, are this design's choices.
module alu
  import ip_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_op_t           op,
  output logic [DATA_W-1:0] r,
  output status_t           flags
);

  logic [DATA_W:0] sum;

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    flags.v = 1'b0;
    flags.c = 1'b0;
    unique case (op)
      ALU_PASS_A: r = a;
      ALU_PASS_B: r = b;
      ALU_ADD: begin
        r       = sum[DATA_W-1:0];
        flags.c = sum[DATA_W];
        flags.v = (a[DATA_W-1] == b[DATA_W-1]) && (r[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_AND:    r = a & b;
      ALU_INV:    r = ~a;
      ALU_ROTL: begin
        r       = {a[DATA_W-2:0], a[DATA_W-1]};
        flags.c = a[DATA_W-1];
      end
      default:    r = a;
    endcase
    flags.n = r[DATA_W-1];
    flags.z = (r == '0);
  end

endmodule
