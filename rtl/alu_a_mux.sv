// alu_a_mux: the multiplexer in front of ALU input A.
//
// Combinational. With extend low, ALU input A is BUS A. With extend high it
// is the 6-bit VALUE field of the instruction register, sign-extended to 16
// bits, so that immediates (#-1), absolute addresses and branch
// displacements reach the ALU. That the second multiplexer input is the
// sign-extended VALUE field is this design's reading of the unlabeled input
// in the data path drawing and of the extend / sign_extend signals in the
// simulation waveform.
module alu_a_mux
  import ip_pkg::*;
(
  input  logic [DATA_W-1:0] bus_a,
  input  logic [5:0]        value,
  input  logic              extend,
  output logic [DATA_W-1:0] alu_a
);

  always_comb begin
    if (extend) alu_a = {{(DATA_W-6){value[5]}}, value};
    else        alu_a = bus_a;
  end

endmodule
