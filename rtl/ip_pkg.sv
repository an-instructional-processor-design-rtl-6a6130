// ip_pkg: shared types and constants of the instructional processor.
//
// The instruction word is 16 bits: OP in [15:13], source mode in [12:11],
// source register in [10:9], destination mode in [8], destination register
// in [7:6] and a 6-bit VALUE (immediate, absolute address or branch
// displacement) in [5:0]. MOVE=000, ADD=001, BGTZ=110 and HALT=111 are the
// published opcodes; AND, INV and ROTL (the microcontroller additions) and
// BRA (branch always) are placed on the free codes 010..101 by this design.
// The control word ctrl_t carries the control signals named in the fetch and
// execute sequences (BUS_B <= PC, Load_MAR, Inc_PC, MEM_Read, Load_MDR, ...).
package ip_pkg;

  localparam int unsigned DATA_W  = 16;  // data path width
  localparam int unsigned ADDR_W  = 6;   // 64-word address space
  localparam int unsigned NREGS   = 4;   // register file words
  localparam int unsigned STEP_W  = 3;   // control steps T0..T7

  // Memory-mapped I/O locations (chosen by this design: top two words).
  localparam logic [ADDR_W-1:0] PORTA_ADDR = 6'h3E;
  localparam logic [ADDR_W-1:0] PORTB_ADDR = 6'h3F;

  typedef enum logic [2:0] {
    OP_MOVE = 3'b000,
    OP_ADD  = 3'b001,
    OP_AND  = 3'b010,
    OP_INV  = 3'b011,
    OP_ROTL = 3'b100,
    OP_BRA  = 3'b101,
    OP_BGTZ = 3'b110,
    OP_HALT = 3'b111
  } opcode_t;

  // Source addressing modes S0..S3 and destination modes D0..D1.
  localparam logic [1:0] SRC_REG  = 2'b00;  // Rn
  localparam logic [1:0] SRC_IND  = 2'b01;  // (Rn)
  localparam logic [1:0] SRC_IMM  = 2'b10;  // #Value
  localparam logic [1:0] SRC_ABS  = 2'b11;  // Value
  localparam logic       DST_REG  = 1'b0;   // Rn
  localparam logic       DST_ABS  = 1'b1;   // Value

  typedef struct packed {
    opcode_t     op;
    logic [1:0]  src_mode;
    logic [1:0]  src_reg;
    logic        dst_mode;
    logic [1:0]  dst_reg;
    logic [5:0]  value;
  } instr_t;

  typedef enum logic [2:0] {
    ALU_PASS_A = 3'd0,
    ALU_PASS_B = 3'd1,
    ALU_ADD    = 3'd2,
    ALU_AND    = 3'd3,
    ALU_INV    = 3'd4,
    ALU_ROTL   = 3'd5
  } alu_op_t;

  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } status_t;

  // Control word. Bus drivers: regs_read1 and mdr_to_a drive BUS A;
  // pc_to_b, regs_read2 and mdr_to_b drive BUS B. BUS C is the ALU result.
  typedef struct packed {
    logic    pc_to_b;
    logic    regs_read1;
    logic    regs_read2;
    logic    mdr_to_a;
    logic    mdr_to_b;
    logic    extend;       // ALU A input takes sign-extended IR VALUE
    alu_op_t alu_op;
    logic    load_status;
    logic    regs_write;
    logic    load_mar;
    logic    inc_pc;
    logic    load_pc;
    logic    load_ir;
    logic    load_mdr;
    logic    mem_read;
    logic    mem_write;
    logic    clear;        // return the step counter to T0
    logic    stop;         // HALT: freeze the step counter
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{alu_op: ALU_PASS_A, default: 1'b0};

endpackage
