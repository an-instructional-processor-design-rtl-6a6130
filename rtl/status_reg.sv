// status_reg: the NZVC STATUS register.
//
// Loads the ALU flags on the rising clock edge when load_status is high
// (for example in the last step of MOVE Rs,Rd) and holds them otherwise.
// Synchronous active-high reset clears all four flags (reset value is this
// design's choice). The control unit reads N and Z for BGTZ.
module status_reg
  import ip_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    load_status,
  input  status_t flags_in,
  output status_t status
);

  always_ff @(posedge clk) begin
    if (reset)            status <= '0;
    else if (load_status) status <= flags_in;
  end

endmodule
