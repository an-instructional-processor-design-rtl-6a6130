// datapath: the three-bus 16-bit data path of the instructional processor.
//
// BUS A and BUS B carry operands to the ALU and BUS C carries its result
// back to the registers. Sources: REGS read port 1 and MDR onto BUS A; PC,
// REGS read port 2 and MDR onto BUS B. ALU input A passes through a
// multiplexer that can substitute the sign-extended IR VALUE field.
// Destinations on BUS C: PC and MAR (low 6 bits), IR, REGS and MDR. MEM is
// addressed by MAR and written from MDR; its read data (or a port byte from
// the memory-mapped PORTA / PORTB block) loads MDR. Every register changes
// only on the rising clock edge selected by the control word; the buses and
// ALU are combinational within one control step. The IR fields A1 (source
// register) and A2 (destination register) address the register file.
module datapath
  import ip_pkg::*;
#(
  parameter string INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              reset,
  input  ctrl_t             ctrl,
  input  logic [7:0]        porta_in,
  output logic [7:0]        portb_out,
  output instr_t            ir,
  output status_t           status,
  output logic [ADDR_W-1:0] pc
);

  logic [DATA_W-1:0] bus_a, bus_b, bus_c, alu_a;
  logic [DATA_W-1:0] r1, r2, mdr, ram_rdata, mem_rdata;
  logic [ADDR_W-1:0] mar;
  logic              ram_write;
  status_t           flags;

  pc_reg u_pc (
    .clk, .reset, .load_pc(ctrl.load_pc), .inc_pc(ctrl.inc_pc),
    .d(bus_c[ADDR_W-1:0]), .pc
  );

  ir_reg u_ir (.clk, .reset, .load_ir(ctrl.load_ir), .d(bus_c), .ir);

  regs u_regs (
    .clk, .reset, .a1(ir.src_reg), .a2(ir.dst_reg),
    .regs_write(ctrl.regs_write), .wdata(bus_c), .rdata1(r1), .rdata2(r2)
  );

  buses u_buses (
    .clk,
    .regs_read1(ctrl.regs_read1), .mdr_to_a(ctrl.mdr_to_a),
    .pc_to_b(ctrl.pc_to_b), .regs_read2(ctrl.regs_read2), .mdr_to_b(ctrl.mdr_to_b),
    .regs_rdata1(r1), .regs_rdata2(r2), .mdr, .pc, .bus_a, .bus_b
  );

  alu_a_mux u_mux (.bus_a, .value(ir.value), .extend(ctrl.extend), .alu_a);

  alu u_alu (.a(alu_a), .b(bus_b), .op(ctrl.alu_op), .r(bus_c), .flags);

  status_reg u_status (
    .clk, .reset, .load_status(ctrl.load_status), .flags_in(flags), .status
  );

  mar_reg u_mar (
    .clk, .reset, .load_mar(ctrl.load_mar), .d(bus_c[ADDR_W-1:0]), .mar
  );

  mdr_reg u_mdr (
    .clk, .reset, .load_mdr(ctrl.load_mdr), .mem_read(ctrl.mem_read),
    .mem_data(mem_rdata), .bus_c, .mdr
  );

  mem64 #(.WORDS(1 << ADDR_W), .INIT_FILE(INIT_FILE)) u_mem (
    .clk, .addr(mar), .mem_write(ram_write), .wdata(mdr), .rdata(ram_rdata)
  );

  io_ports u_io (
    .clk, .reset, .addr(mar), .mem_write(ctrl.mem_write), .wdata(mdr),
    .ram_rdata, .porta_in, .ram_write, .rdata(mem_rdata), .portb_out
  );

endmodule
