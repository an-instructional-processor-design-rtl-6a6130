// mem64: the 64-word by 16-bit memory MEM holding both program and data.
//
// The address comes from MAR, write data from MDR. Reads are
// combinational, so MDR <- MEM(MAR) completes in one control step with
// MEM_Read and Load_MDR; writes happen on the rising clock edge when
// mem_write is high. The initial contents are the program: with INIT_FILE
// set they are read from that hex file (one 16-bit word per line, address
// 0 first), otherwise every word starts at 0. On an FPGA this maps to
// distributed RAM initialised at configuration; reset does not clear it.
module mem64
  import ip_pkg::*;
#(
  parameter int unsigned WORDS     = 64,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     mem_write,
  input  logic [DATA_W-1:0]        wdata,
  output logic [DATA_W-1:0]        rdata
);

  logic [DATA_W-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
