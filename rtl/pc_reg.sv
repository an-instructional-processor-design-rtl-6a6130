// pc_reg: the 6-bit program counter PC.
//
// On the rising clock edge: load_pc stores the low 6 bits of BUS C (taken
// branch, PC <- PC + DISP); otherwise inc_pc adds one (fetch step T0,
// PC <- PC + 1). Load has priority over increment (this design's choice;
// the two are never asserted together). Synchronous reset sets PC to 0,
// where programs start. The PC value drives BUS B zero-extended to 16 bits.
module pc_reg
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              load_pc,
  input  logic              inc_pc,
  input  logic [ADDR_W-1:0] d,
  output logic [ADDR_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (reset)        pc <= '0;
    else if (load_pc) pc <= d;
    else if (inc_pc)  pc <= pc + 1'b1;
  end

endmodule
