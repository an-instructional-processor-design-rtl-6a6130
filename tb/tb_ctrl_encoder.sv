// tb_ctrl_encoder: checks the control encoder over every opcode, source
// mode, destination mode and N/Z combination. The fetch steps must give
// exactly the published control words (T0: BUS_B <= PC, Pass_B, Load_MAR,
// Inc_PC; T1: MEM_Read, Load_MDR; T2: BUS_B <= MDR, Pass_B, Load_IR) and
// MOVE Rs,Rd at T3 exactly REGS_Read1, Pass_A, Load_STATUS, REGS_Write,
// Clear. For every instruction it checks the step at which Clear (or Stop)
// ends it against a table of instruction lengths, that the result is
// written once, in the right place and with the right ALU operation, that
// BGTZ loads PC only when N=0 and Z=0, and that no bus has two drivers.
module tb_ctrl_encoder;
  import ip_pkg::*;
  logic [7:0] t, i;
  logic [3:0] s;
  logic [1:0] d;
  status_t    status;
  ctrl_t      c, exp_c;
  int checks = 0, failures = 0;

  ctrl_encoder dut (.t, .i, .s, .d, .status, .c);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_len(int op, int sm, int dm);
    bit data = (op <= 4), binary = (op == 1 || op == 2);
    if (!data) return 4;
    if (dm == 0) return (sm == 0 || sm == 2) ? 4 : 6;
    if (sm == 1) return binary ? 4 : 8;
    return 7;
  endfunction

  function automatic alu_op_t exp_fop(int op);
    case (op)
      1: return ALU_ADD;
      2: return ALU_AND;
      3: return ALU_INV;
      4: return ALU_ROTL;
      default: return ALU_PASS_A;
    endcase
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    for (int op = 0; op < 8; op++)
      for (int sm = 0; sm < 4; sm++)
        for (int dm = 0; dm < 2; dm++)
          for (int nz = 0; nz < 4; nz++) begin
            int len, end_step, writes, write_step, pc_loads;
            string id;
            id = $sformatf("op=%0d s=%0d d=%0d nz=%0d", op, sm, dm, nz);
            i = 8'(1 << op); s = 4'(1 << sm); d = 2'(1 << dm);
            status = status_t'({2'(nz), 2'b00});
            len = exp_len(op, sm, dm);
            end_step = -1; writes = 0; write_step = -1; pc_loads = 0;
            for (int st = 0; st < 8; st++) begin
              t = 8'(1 << st);
              #1;
              // fetch words
              if (st <= 2) begin
                exp_c = CTRL_IDLE;
                case (st)
                  0: begin exp_c.pc_to_b = 1; exp_c.alu_op = ALU_PASS_B; exp_c.load_mar = 1; exp_c.inc_pc = 1; end
                  1: begin exp_c.mem_read = 1; exp_c.load_mdr = 1; end
                  default: begin exp_c.mdr_to_b = 1; exp_c.alu_op = ALU_PASS_B; exp_c.load_ir = 1; end
                endcase
                checks++;
                if (c !== exp_c) fail($sformatf("%s fetch T%0d word %h exp %h", id, st, c, exp_c));
              end
              if (op == 0 && sm == 0 && dm == 0 && st == 3) begin
                exp_c = CTRL_IDLE;
                exp_c.regs_read1 = 1; exp_c.alu_op = ALU_PASS_A; exp_c.load_status = 1;
                exp_c.regs_write = 1; exp_c.clear = 1;
                checks++;
                if (c !== exp_c) fail($sformatf("%s MOVE Rs,Rd word %h exp %h", id, c, exp_c));
              end
              checks++;
              if ((c.regs_read1 && c.mdr_to_a) || (int'(c.pc_to_b) + int'(c.regs_read2) + int'(c.mdr_to_b) > 1))
                fail($sformatf("%s T%0d two bus drivers", id, st));
              if (end_step < 0 && (c.clear || c.stop)) end_step = st;
              if (end_step < 0 || end_step == st) begin
                if (c.regs_write || c.mem_write) begin
                  writes++; write_step = st;
                  if (c.regs_write && c.alu_op != exp_fop(op))
                    fail($sformatf("%s alu op %0d", id, c.alu_op));
                end
                if (c.load_pc) pc_loads++;
              end
            end
            checks++;
            if (end_step != len - 1) fail($sformatf("%s ends at T%0d exp T%0d", id, end_step, len - 1));
            checks++;
            if (op <= 4 && !(dm == 1 && sm == 1 && (op == 1 || op == 2))) begin
              if (writes != 1 || write_step != len - 1) fail($sformatf("%s writes=%0d at T%0d", id, writes, write_step));
            end else if (writes != 0) fail($sformatf("%s unexpected write", id));
            checks++;
            if (op == 5 && pc_loads != 1) fail($sformatf("%s BRA no PC load", id));
            if (op == 6 && pc_loads != ((nz == 0) ? 1 : 0)) fail($sformatf("%s BGTZ pc_loads=%0d", id, pc_loads));
            if (op < 5 && pc_loads != 0) fail($sformatf("%s stray PC load", id));
            if (op == 7) begin
              t = 8'h08; #1;
              checks++;
              if (!c.stop || c.clear) fail($sformatf("%s HALT", id));
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
