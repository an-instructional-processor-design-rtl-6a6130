// ctrl_decoders: the four one-hot decoders of the control unit.
//
// Step DCD turns the 3-bit step count into T0..T7, Instruction DCD turns the
// opcode IR[15:13] into I0..I7, SRC_MODE DCD turns IR[12:11] into S0..S3 and
// DST_MODE DCD turns IR[8] into D0..D1 (the four decoders and their output
// names follow the published controller organisation). Each output vector is one-hot,
// bit k high for value k. Purely combinational.
module ctrl_decoders
  import ip_pkg::*;
(
  input  logic [STEP_W-1:0] step,
  input  instr_t            ir,
  output logic [7:0]        t,
  output logic [7:0]        i,
  output logic [3:0]        s,
  output logic [1:0]        d
);

  always_comb begin
    t = '0;
    i = '0;
    s = '0;
    d = '0;
    t[step]        = 1'b1;
    i[ir.op]       = 1'b1;
    s[ir.src_mode] = 1'b1;
    d[ir.dst_mode] = 1'b1;
  end

endmodule
