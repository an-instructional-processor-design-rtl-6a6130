// io_ports: memory-mapped parallel ports of the microcontroller.
//
// PORTA is an 8-bit input port (switches) read at address PORTA_ADDR; PORTB
// is an 8-bit output register (LEDs) written at PORTB_ADDR. Both sit in the
// memory address space, so the ordinary MOVE instruction reaches them. The
// block decodes MAR: a read of either port returns the port byte
// zero-extended to 16 bits in place of the memory word, and a write to
// either port address is kept away from the memory (ram_write low). A write
// to PORTB stores the low byte of MDR on the rising clock edge; writing
// PORTA does nothing. The switch inputs pass through one register stage
// before they are read. Addresses 62 and 63, the register stage, the byte
// placement and the read-back of PORTB are this design's choices.
module io_ports
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] addr,
  input  logic              mem_write,
  input  logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] ram_rdata,
  input  logic [7:0]        porta_in,
  output logic              ram_write,
  output logic [DATA_W-1:0] rdata,
  output logic [7:0]        portb_out
);

  logic [7:0] porta_q;
  logic       sel_a, sel_b;

  assign sel_a     = (addr == PORTA_ADDR);
  assign sel_b     = (addr == PORTB_ADDR);
  assign ram_write = mem_write && !sel_a && !sel_b;

  always_ff @(posedge clk) begin
    if (reset) begin
      porta_q   <= '0;
      portb_out <= '0;
    end else begin
      porta_q <= porta_in;
      if (mem_write && sel_b) portb_out <= wdata[7:0];
    end
  end

  always_comb begin
    if (sel_a)      rdata = {{(DATA_W-8){1'b0}}, porta_q};
    else if (sel_b) rdata = {{(DATA_W-8){1'b0}}, portb_out};
    else            rdata = ram_rdata;
  end

endmodule
