// mdr_reg: the 16-bit memory data register MDR.
//
// Two inputs, as drawn in the data path: the memory read data and BUS C.
// On the rising clock edge with load_mdr high it stores the memory word
// when mem_read is also high (MDR <- MEM(MAR)) and BUS C otherwise (an ALU
// result on its way to memory). Its output drives BUS A, BUS B and the
// memory write data. Synchronous reset clears it (this design's choice).
module mdr_reg
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              load_mdr,
  input  logic              mem_read,
  input  logic [DATA_W-1:0] mem_data,
  input  logic [DATA_W-1:0] bus_c,
  output logic [DATA_W-1:0] mdr
);

  always_ff @(posedge clk) begin
    if (reset)         mdr <= '0;
    else if (load_mdr) mdr <= mem_read ? mem_data : bus_c;
  end

endmodule
