// step_counter: the control step counter of the hardwired control unit.
//
// A 3-bit counter giving the control steps T0..T7. It advances by one on
// every rising clock edge, returns to T0 when the encoder raises clear (the
// last step of each instruction) and freezes when the encoder raises stop
// (HALT, Stop <- 1). The stop condition is held in the halted flip-flop
// until reset, so the processor stays halted. Synchronous active-high reset
// returns to T0 and clears halted. Clear taking priority over stop and the
// halted flip-flop are this design's choices.
module step_counter
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              clear,
  input  logic              stop,
  output logic [STEP_W-1:0] step,
  output logic              halted
);

  always_ff @(posedge clk) begin
    if (reset) begin
      step   <= '0;
      halted <= 1'b0;
    end else if (halted) begin
      step   <= step;
    end else if (clear) begin
      step   <= '0;
    end else if (stop) begin
      halted <= 1'b1;
    end else begin
      step   <= step + 1'b1;
    end
  end

endmodule
