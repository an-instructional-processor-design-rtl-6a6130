// ctrl_encoder: the encoder of the hardwired control unit.
//
// Combinational. From the one-hot step (T0..T7), instruction (I0..I7),
// source mode (S0..S3) and destination mode (D0..D1) lines and the N and Z
// status flags it forms the control word for the current step.
//
// Fetch, for every instruction (as published):
//   T0  MAR <- PC, PC <- PC + 1   BUS_B <= PC, Pass_B, Load_MAR, Inc_PC
//   T1  MDR <- MEM(MAR)           MEM_Read, Load_MDR
//   T2  IR <- MDR                 BUS_B <= MDR, Pass_B, Load_IR
// Execute, from T3; f is Pass_A (MOVE), ADD, AND, INV or ROTL with A the
// source operand and B the destination operand. Only MOVE Rs,Rd is
// published; the other sequences are this design's, built from the same
// data path moves:
//   D0, S0 (Rs)      T3  R(D) <- f(R(S), R(D)), Load_STATUS, Clear
//   D0, S2 (#V)      T3  R(D) <- f(sext V, R(D)), Load_STATUS, Clear
//   D0, S1/S3        T3  MAR <- R(S) or sext V; T4 MDR <- MEM(MAR);
//                    T5  R(D) <- f(MDR, R(D)), Load_STATUS, Clear
//   D1, S0/S2/S3     T3  MAR <- sext V; T4 MDR <- MEM(MAR);
//                    T5  MDR <- f(src, MDR), Load_STATUS; T6 MEM(MAR) <- MDR, Clear
//   D1, S1, MOVE/INV/ROTL
//                    T3  MAR <- R(S); T4 MDR <- MEM(MAR); T5 MDR <- f(MDR), Load_STATUS;
//                    T6  MAR <- sext V; T7 MEM(MAR) <- MDR, Clear
//   D1, S1, ADD/AND  T3  Clear (no operation: the data path has no second
//                    temporary register to hold both memory operands)
//   BGTZ             T3  if N=0 and Z=0: PC <- PC + sext DISP; Clear
//   BRA              T3  PC <- PC + sext DISP; Clear
//   HALT             T3  Stop
// The source and destination of the D1 forms share the one VALUE field.
module ctrl_encoder
  import ip_pkg::*;
(
  input  logic [7:0] t,
  input  logic [7:0] i,
  input  logic [3:0] s,
  input  logic [1:0] d,
  input  status_t    status,
  output ctrl_t      c
);

  logic    data_op, binary_op;
  alu_op_t fop;

  always_comb begin
    data_op   = i[OP_MOVE] | i[OP_ADD] | i[OP_AND] | i[OP_INV] | i[OP_ROTL];
    binary_op = i[OP_ADD] | i[OP_AND];
    fop       = ALU_PASS_A;
    if (i[OP_ADD])  fop = ALU_ADD;
    if (i[OP_AND])  fop = ALU_AND;
    if (i[OP_INV])  fop = ALU_INV;
    if (i[OP_ROTL]) fop = ALU_ROTL;
  end

  always_comb begin
    c = CTRL_IDLE;
    // ---------------- fetch ----------------
    if (t[0]) begin
      c.pc_to_b  = 1'b1;
      c.alu_op   = ALU_PASS_B;
      c.load_mar = 1'b1;
      c.inc_pc   = 1'b1;
    end
    if (t[1]) begin
      c.mem_read = 1'b1;
      c.load_mdr = 1'b1;
    end
    if (t[2]) begin
      c.mdr_to_b = 1'b1;
      c.alu_op   = ALU_PASS_B;
      c.load_ir  = 1'b1;
    end
    // ---------------- branches and HALT ----------------
    if (t[3] && i[OP_HALT]) c.stop = 1'b1;
    if (t[3] && (i[OP_BRA] || (i[OP_BGTZ] && !status.n && !status.z))) begin
      c.extend  = 1'b1;
      c.pc_to_b = 1'b1;
      c.alu_op  = ALU_ADD;
      c.load_pc = 1'b1;
    end
    if (t[3] && (i[OP_BRA] || i[OP_BGTZ])) c.clear = 1'b1;
    // ---------------- data instructions, register destination ----------------
    if (data_op && d[DST_REG]) begin
      if (t[3] && (s[SRC_REG] || s[SRC_IMM])) begin
        c.regs_read1  = s[SRC_REG];
        c.extend      = s[SRC_IMM];
        c.regs_read2  = binary_op;
        c.alu_op      = fop;
        c.regs_write  = 1'b1;
        c.load_status = 1'b1;
        c.clear       = 1'b1;
      end
      if (t[3] && (s[SRC_IND] || s[SRC_ABS])) begin
        c.regs_read1 = s[SRC_IND];
        c.extend     = s[SRC_ABS];
        c.alu_op     = ALU_PASS_A;
        c.load_mar   = 1'b1;
      end
      if (t[4] && (s[SRC_IND] || s[SRC_ABS])) begin
        c.mem_read = 1'b1;
        c.load_mdr = 1'b1;
      end
      if (t[5] && (s[SRC_IND] || s[SRC_ABS])) begin
        c.mdr_to_a    = 1'b1;
        c.regs_read2  = binary_op;
        c.alu_op      = fop;
        c.regs_write  = 1'b1;
        c.load_status = 1'b1;
        c.clear       = 1'b1;
      end
    end
    // ---------------- data instructions, absolute destination ----------------
    if (data_op && d[DST_ABS] && !s[SRC_IND]) begin
      if (t[3]) begin
        c.extend   = 1'b1;
        c.alu_op   = ALU_PASS_A;
        c.load_mar = 1'b1;
      end
      if (t[4]) begin
        c.mem_read = 1'b1;
        c.load_mdr = 1'b1;
      end
      if (t[5]) begin
        c.regs_read1  = s[SRC_REG];
        c.extend      = s[SRC_IMM];
        c.mdr_to_a    = s[SRC_ABS];
        c.mdr_to_b    = binary_op;
        c.alu_op      = fop;
        c.load_mdr    = 1'b1;
        c.load_status = 1'b1;
      end
      if (t[6]) begin
        c.mem_write = 1'b1;
        c.clear     = 1'b1;
      end
    end
    if (data_op && d[DST_ABS] && s[SRC_IND]) begin
      if (binary_op) begin
        if (t[3]) c.clear = 1'b1;
      end else begin
        if (t[3]) begin
          c.regs_read1 = 1'b1;
          c.alu_op     = ALU_PASS_A;
          c.load_mar   = 1'b1;
        end
        if (t[4]) begin
          c.mem_read = 1'b1;
          c.load_mdr = 1'b1;
        end
        if (t[5]) begin
          c.mdr_to_a    = 1'b1;
          c.alu_op      = fop;
          c.load_mdr    = 1'b1;
          c.load_status = 1'b1;
        end
        if (t[6]) begin
          c.extend   = 1'b1;
          c.alu_op   = ALU_PASS_A;
          c.load_mar = 1'b1;
        end
        if (t[7]) begin
          c.mem_write = 1'b1;
          c.clear     = 1'b1;
        end
      end
    end
  end

endmodule
