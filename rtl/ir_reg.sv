// ir_reg: the 16-bit instruction register IR.
//
// Loads BUS C on the rising clock edge when load_ir is high (fetch step T2,
// IR <- MDR passed through the ALU) and holds otherwise. Its fields address
// the register file and feed the control unit's decoders and the ALU input
// multiplexer. Synchronous reset clears it (this design's choice).
module ir_reg
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              load_ir,
  input  logic [DATA_W-1:0] d,
  output instr_t            ir
);

  always_ff @(posedge clk) begin
    if (reset)        ir <= '0;
    else if (load_ir) ir <= instr_t'(d);
  end

endmodule
