// processor: the instructional processor as a small microcontroller.
//
// A 16-bit processor with a three-bus data path (PC, IR, four registers,
// ALU with NZVC status, MDR, MAR and a 64 x 16 memory) run by a hardwired
// control unit that steps each instruction through fetch (T0..T2) and
// execute (T3 onward). Eight instructions (MOVE, ADD, AND, INV, ROTL, BRA,
// BGTZ, HALT) with register direct, register indirect, immediate and
// absolute source modes and register direct or absolute destinations. An
// 8-bit input port PORTA (switches) and an 8-bit output port PORTB (LEDs)
// are mapped into the memory address space at 62 and 63.
//
// Interface: clk and a synchronous active-high reset (the reset button);
// porta_in from the switches; portb_out to the LEDs; halted high once a
// HALT has executed, until reset. After reset the program runs from
// address 0. The memory contents at power-up come from INIT_FILE; the
// default program shows a rotating or inverted LED pattern chosen by the
// switches.
module processor
  import ip_pkg::*;
#(
  parameter string INIT_FILE = "rtl/led_demo.hex"
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] porta_in,
  output logic [7:0] portb_out,
  output logic       halted
);

  ctrl_t             ctrl;
  instr_t            ir;
  status_t           status;

  datapath #(.INIT_FILE(INIT_FILE)) u_dp (
    .clk, .reset, .ctrl, .porta_in, .portb_out, .ir, .status, .pc()
  );

  control_unit u_cu (
    .clk, .reset, .ir, .status, .ctrl, .step(), .halted
  );

endmodule
