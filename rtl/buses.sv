// buses: driver selection for BUS A and BUS B of the three-bus data path.
//
// The data path draws three 16-bit buses. BUS A is driven by register file
// read port 1 (regs_read1) or by MDR (mdr_to_a); BUS B by PC zero-extended
// from 6 bits (pc_to_b), register file read port 2 (regs_read2) or MDR
// (mdr_to_b). BUS C is the ALU result and needs no selection. The buses are
// built as multiplexers rather than tri-state lines, and an undriven bus
// reads 0 (both this design's choices). At most one driver per bus may be
// enabled in a cycle; an assertion checks that.
module buses
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              regs_read1,
  input  logic              mdr_to_a,
  input  logic              pc_to_b,
  input  logic              regs_read2,
  input  logic              mdr_to_b,
  input  logic [DATA_W-1:0] regs_rdata1,
  input  logic [DATA_W-1:0] regs_rdata2,
  input  logic [DATA_W-1:0] mdr,
  input  logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] bus_a,
  output logic [DATA_W-1:0] bus_b
);

  always_comb begin
    bus_a = '0;
    if (regs_read1)    bus_a = regs_rdata1;
    else if (mdr_to_a) bus_a = mdr;
  end

  always_comb begin
    bus_b = '0;
    if (pc_to_b)         bus_b = {{(DATA_W-ADDR_W){1'b0}}, pc};
    else if (regs_read2) bus_b = regs_rdata2;
    else if (mdr_to_b)   bus_b = mdr;
  end

  a_one_driver_a: assert property (@(posedge clk) !(regs_read1 && mdr_to_a));
  a_one_driver_b: assert property (@(posedge clk) $onehot0({pc_to_b, regs_read2, mdr_to_b}));

endmodule
