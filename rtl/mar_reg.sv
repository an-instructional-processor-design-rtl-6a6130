// mar_reg: the 6-bit memory address register MAR.
//
// Loads the low 6 bits of BUS C on the rising clock edge when load_mar is
// high (fetch step T0, MAR <- PC; operand address steps) and holds
// otherwise. Its output addresses the memory and the I/O ports.
// Synchronous reset clears it (this design's choice).
module mar_reg
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              load_mar,
  input  logic [ADDR_W-1:0] d,
  output logic [ADDR_W-1:0] mar
);

  always_ff @(posedge clk) begin
    if (reset)         mar <= '0;
    else if (load_mar) mar <= d;
  end

endmodule
