// control_unit: the hardwired control unit of the instructional processor.
//
// A finite state machine built from a control step counter, a step decoder,
// instruction / source mode / destination mode decoders driven by IR, and a
// combinational encoder that also reads the STATUS flags. Each instruction
// runs a three-step fetch (T0..T2) and then its execute steps from T3; the
// encoder's clear ends the instruction and returns the counter to T0, and
// stop (HALT) freezes it. ctrl is valid throughout each clock cycle and is
// acted on by the data path at the next rising edge.
module control_unit
  import ip_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  instr_t            ir,
  input  status_t           status,
  output ctrl_t             ctrl,
  output logic [STEP_W-1:0] step,
  output logic              halted
);

  logic [7:0] t, i;
  logic [3:0] s;
  logic [1:0] d;

  step_counter u_counter (
    .clk, .reset, .clear(ctrl.clear), .stop(ctrl.stop), .step, .halted
  );

  ctrl_decoders u_dcd (.step, .ir, .t, .i, .s, .d);

  ctrl_encoder u_enc (.t, .i, .s, .d, .status, .c(ctrl));

endmodule
