// regs: the four-word by 16-bit register file REGS (R0..R3).
//
// Two combinational read ports and one synchronous write port. Read port 1
// is addressed by A1 (the source register field of IR) and drives BUS A;
// read port 2 is addressed by A2 (the destination register field) and
// drives BUS B. The write port stores BUS C into the register addressed by
// A2 on the rising clock edge when regs_write is high, as in
// R(D) <- R(S). Synchronous reset clears all registers (this design's
// choice; the document does not give reset behaviour).
module regs
  import ip_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [$clog2(N)-1:0] a1,
  input  logic [$clog2(N)-1:0] a2,
  input  logic                 regs_write,
  input  logic [DATA_W-1:0]    wdata,
  output logic [DATA_W-1:0]    rdata1,
  output logic [DATA_W-1:0]    rdata2
);

  logic [DATA_W-1:0] r [N];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (regs_write) begin
      r[a2] <= wdata;
    end
  end

  assign rdata1 = r[a1];
  assign rdata2 = r[a2];

endmodule
