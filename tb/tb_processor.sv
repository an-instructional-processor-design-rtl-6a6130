// tb_processor: end-to-end test of the processor at its default parameters.
//
// Programs are assembled here and written into the memory while reset is
// held. An instruction-level reference model in this testbench runs the
// same image and predicts the final registers, memory, PORTB, flags and the
// exact number of clock cycles to HALT (4 cycles for register / immediate
// forms and branches, 6 for an indirect or absolute source, 7 for an
// absolute destination, 8 for an indirect source to an absolute
// destination). Runs:
//   1. MOVE #3,R1 / MOVE R1,R2 / HALT (12 cycles to halt);
//   2. the array-sum program (MOVE N,R1 ... BGTZ LOOP, MOVE R0,SUM, HALT)
//      for several array lengths;
//   3. random straight-line programs with forward branches that use every
//      opcode and addressing mode, PORTA reads and PORTB writes;
//   4. the default power-up program (LED demo) with its delay shortened:
//      PORTB must rotate with switch 0 off and invert with it on.
// Counters record each mechanism seen (every source mode, both destination
// modes, every ALU operation, BGTZ taken and not taken, BRA, HALT, PORTA
// read, PORTB write, memory write, the unsupported ADD/AND (Rs),Value no-op);
// one that never happens counts as a failure.
module tb_processor;
  import ip_pkg::*;
  logic clk = 0, reset = 1;
  logic [7:0] porta_in = 8'h00, portb_out;
  logic halted;
  int checks = 0, failures = 0;

  processor dut (.clk, .reset, .porta_in, .portb_out, .halted);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // assembler
  function automatic logic [15:0] asm(opcode_t op, int sm, int sr, int dm, int dr, int v);
    return {op, 2'(sm), 2'(sr), 1'(dm), 2'(dr), 6'(v)};
  endfunction

  // ------------------------------------------------------------------
  // reference model
  logic [15:0] m [64];
  logic [15:0] R [4];
  logic [7:0]  ref_portb;
  logic        fn, fz, fv, fc;

  function automatic logic [15:0] rd(logic [5:0] a);
    if (a == 6'd62) return {8'h00, porta_in};
    if (a == 6'd63) return {8'h00, ref_portb};
    return m[a];
  endfunction

  function automatic void wr(logic [5:0] a, logic [15:0] v);
    if (a == 6'd63) ref_portb = v[7:0];
    else if (a != 6'd62) m[a] = v;
  endfunction

  // Runs the model from PC 0 to HALT; returns the cycle count.
  function automatic int model_run();
    int cycles = 0, pc = 0, steps = 0;
    for (int k = 0; k < 4; k++) R[k] = 0;
    ref_portb = 0; fn = 0; fz = 0; fv = 0; fc = 0;
    forever begin
      logic [15:0] w, src, dst, res, sx;
      int op, sm, sr, dm, dr, len;
      bit unary;
      w = m[pc]; pc = (pc + 1) % 64; steps++;
      op = int'(w[15:13]); sm = int'(w[12:11]); sr = int'(w[10:9]);
      dm = int'(w[8]); dr = int'(w[7:6]);
      sx = {{10{w[5]}}, w[5:0]};
      len = 4;
      if (op == 7 || steps > 5000) return cycles + 4;
      if (op == 5 || (op == 6 && !fn && !fz)) pc = (pc + int'(sx)) % 64;
      if (op <= 4) begin
        unary = (op == 0 || op == 3 || op == 4);
        case (sm)
          0: src = R[sr];
          1: src = rd(R[sr][5:0]);
          2: src = sx;
          default: src = rd(w[5:0]);
        endcase
        dst = dm ? rd(w[5:0]) : R[dr];
        if (dm && sm == 1 && !unary) begin
          len = 4;
        end else begin
          fv = 0; fc = 0;
          case (op)
            0: res = src;
            1: begin
              res = src + dst;
              fc = (int'(src) + int'(dst)) > 65535;
              fv = (src[15] == dst[15]) && (res[15] != src[15]);
            end
            2: res = src & dst;
            3: res = ~src;
            default: begin res = {src[14:0], src[15]}; fc = src[15]; end
          endcase
          fn = res[15]; fz = (res == 0);
          if (dm) wr(w[5:0], res); else R[dr] = res;
          if (!dm) len = (sm == 0 || sm == 2) ? 4 : 6;
          else len = (sm == 1) ? 8 : 7;
        end
      end
      cycles += len;
    end
  endfunction

  // ------------------------------------------------------------------
  // mechanism counters, sampled from the control word every cycle
  int n_src[4], n_dst[2], n_alu[6], n_bgtz_taken, n_bgtz_not, n_bra, n_halt;
  int n_porta, n_portb, n_memwr, n_noop;
  always @(posedge clk) if (!reset && !halted) begin
    if (dut.u_cu.step == 3 && dut.u_dp.ir.op <= OP_ROTL) begin
      n_src[dut.u_dp.ir.src_mode]++;
      n_dst[dut.u_dp.ir.dst_mode]++;
      if (dut.u_dp.ir.dst_mode && dut.u_dp.ir.src_mode == 2'b01 &&
          (dut.u_dp.ir.op == OP_ADD || dut.u_dp.ir.op == OP_AND)) n_noop++;
    end
    if (dut.u_cu.step >= 3 && (dut.ctrl.regs_write || dut.ctrl.load_status)) n_alu[dut.ctrl.alu_op]++;
    if (dut.u_cu.step == 3 && dut.u_dp.ir.op == OP_BGTZ) begin
      if (dut.ctrl.load_pc) n_bgtz_taken++; else n_bgtz_not++;
    end
    if (dut.u_cu.step == 3 && dut.u_dp.ir.op == OP_BRA) n_bra++;
    if (dut.ctrl.stop) n_halt++;
    if (dut.ctrl.mem_read && dut.u_dp.u_mar.mar == PORTA_ADDR) n_porta++;
    if (dut.ctrl.mem_write && dut.u_dp.u_mar.mar == PORTB_ADDR) n_portb++;
    if (dut.ctrl.mem_write && dut.u_dp.u_mar.mar < 6'd62) n_memwr++;
  end

  // Waits for the next completed write to PORTB and returns the LED byte.
  task automatic wait_show(output logic [7:0] leds);
    int cyc = 0;
    do begin @(posedge clk); #1; cyc++; end
    while (!(dut.ctrl.mem_write && dut.u_dp.u_mar.mar == PORTB_ADDR) && cyc < 2000);
    @(posedge clk); #1;
    leds = portb_out;
  endtask

  // ------------------------------------------------------------------
  task automatic load_image();
    reset = 1;
    @(posedge clk); #1;
    for (int k = 0; k < 64; k++) dut.u_dp.u_mem.mem[k] = m[k];
  endtask

  // Releases reset, runs to HALT, compares with the model.
  task automatic run_and_compare(input string id);
    logic [15:0] img [64];
    int exp_cycles, cycles;
    for (int k = 0; k < 64; k++) img[k] = m[k];
    load_image();
    exp_cycles = model_run();
    @(posedge clk); #1; reset = 0;
    cycles = 0;
    while (!halted && cycles < 100000) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != exp_cycles) begin failures++; $display("FAIL %s cycles %0d exp %0d", id, cycles, exp_cycles); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (dut.u_dp.u_regs.r[k] !== R[k]) begin failures++; $display("FAIL %s R%0d=%h exp %h", id, k, dut.u_dp.u_regs.r[k], R[k]); end
    end
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (dut.u_dp.u_mem.mem[k] !== m[k]) begin failures++; $display("FAIL %s MEM[%0d]=%h exp %h", id, k, dut.u_dp.u_mem.mem[k], m[k]); end
    end
    checks++;
    if (portb_out !== ref_portb || dut.u_dp.status !== {fn, fz, fv, fc}) begin
      failures++; $display("FAIL %s portb=%h exp %h nzvc=%b exp %b%b%b%b", id, portb_out, ref_portb, dut.u_dp.status, fn, fz, fv, fc);
    end
  endtask

  // ------------------------------------------------------------------
  initial begin
    int exp_sum;
    for (int k = 0; k < 64; k++) m[k] = 0;
    #1;
    // 1. the small MOVE program: 1043h, 0280h, E000h
    m[0] = asm(OP_MOVE, 2, 0, 0, 1, 3);
    m[1] = asm(OP_MOVE, 0, 1, 0, 2, 0);
    m[2] = asm(OP_HALT, 0, 0, 0, 0, 0);
    checks++;
    if (m[0] !== 16'h1043 || m[1] !== 16'h0280 || m[2] !== 16'hE000) begin failures++; $display("FAIL assembler"); end
    run_and_compare("move3");
    checks++;
    if (dut.u_dp.u_regs.r[1] !== 16'd3 || dut.u_dp.u_regs.r[2] !== 16'd3) begin failures++; $display("FAIL move3 regs"); end

    // 2. array sum: N at 40, NUM1 at 41.., SUM at 39
    for (int n = 1; n <= 20; n += 6) begin
      for (int k = 0; k < 64; k++) m[k] = 0;
      m[0] = asm(OP_MOVE, 3, 0, 0, 1, 40);    // MOVE N,R1
      m[1] = asm(OP_MOVE, 2, 0, 0, 2, 41);    // MOVE #NUM1,R2
      m[2] = asm(OP_MOVE, 2, 0, 0, 0, 0);     // MOVE #0,R0
      m[3] = asm(OP_ADD, 1, 2, 0, 0, 0);      // LOOP ADD (R2),R0
      m[4] = asm(OP_ADD, 2, 0, 0, 2, 1);      // ADD #1,R2
      m[5] = asm(OP_ADD, 2, 0, 0, 1, -1);     // ADD #-1,R1
      m[6] = asm(OP_BGTZ, 0, 0, 0, 0, -4);    // BGTZ LOOP
      m[7] = asm(OP_MOVE, 0, 0, 1, 0, 39);    // MOVE R0,SUM
      m[8] = asm(OP_HALT, 0, 0, 0, 0, 0);
      m[40] = 16'(n);
      exp_sum = 0;
      for (int k = 0; k < n; k++) begin m[41 + k] = 16'($urandom % 2000); exp_sum += int'(m[41 + k]); end
      run_and_compare($sformatf("sum n=%0d", n));
      checks++;
      if (dut.u_dp.u_mem.mem[39] !== 16'(exp_sum)) begin failures++; $display("FAIL sum n=%0d got %0d exp %0d", n, dut.u_dp.u_mem.mem[39], exp_sum); end
      checks++;
      // published loop: 14 + 18 per element + 7 + 4 cycles
      if (model_run() != 14 + 18 * n + 11) begin failures++; $display("FAIL sum cycle formula n=%0d", n); end
      for (int k = 0; k < 64; k++) m[k] = dut.u_dp.u_mem.mem[k];
    end

    // 3. random programs
    for (int p = 0; p < 60; p++) begin
      int len;
      porta_in = 8'($urandom);
      for (int k = 0; k < 64; k++) m[k] = (k >= 32) ? 16'($urandom) : asm(OP_HALT, 0, 0, 0, 0, 0);
      len = 10 + ($urandom % 15);
      for (int k = 0; k < len; k++) begin
        int r, op, sm, dm, v;
        r = $urandom % 100;
        if (r < 8) m[k] = asm(OP_BGTZ, 0, 0, 0, 0, $urandom % 4);
        else if (r < 12) m[k] = asm(OP_BRA, 0, 0, 0, 0, $urandom % 3);
        else begin
          op = $urandom % 5; sm = $urandom % 4; dm = $urandom % 2;
          v = 32 + ($urandom % 32);
          if (dm && v == 62) v = 61;
          m[k] = asm(opcode_t'(op), sm, $urandom % 4, dm, $urandom % 4, v);
        end
      end
      // a few fixed instructions seed registers with useful addresses
      m[0] = asm(OP_MOVE, 3, 0, 0, 1, 62);    // R1 <- PORTA
      m[1] = asm(OP_MOVE, 2, 0, 0, 2, 62);    // R2 <- -2 (address 62 = PORTA)
      m[2] = asm(OP_MOVE, 2, 0, 0, 3, 35);    // R3 <- address 35 (low 6 bits)
      run_and_compare($sformatf("random %0d", p));
    end

    // 4. default power-up program (LED demo), delay constant shortened
    begin
      logic [15:0] img [64];
      logic [7:0] seen [8];
      $readmemh("rtl/led_demo.hex", img);
      reset = 1; porta_in = 8'h00;
      @(posedge clk); #1;
      for (int k = 0; k < 64; k++) dut.u_dp.u_mem.mem[k] = (k == 32) ? 16'd3 : img[k];
      @(posedge clk); #1; reset = 0;
      for (int k = 0; k < 8; k++) wait_show(seen[k]);
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (seen[k] !== 8'(2 << k)) begin failures++; $display("FAIL led rotate step %0d = %h", k, seen[k]); end
      end
      // switch 0 on: the pattern is inverted on every pass
      porta_in = 8'h01;
      wait_show(seen[0]);
      for (int k = 1; k < 6; k++) begin
        wait_show(seen[k]);
        checks++;
        if (seen[k] !== ~seen[k - 1]) begin failures++; $display("FAIL led invert %h after %h", seen[k], seen[k - 1]); end
      end
      checks++;
      if (halted) begin failures++; $display("FAIL led demo halted"); end
    end

    // mechanism coverage
    begin
      string names [16] = '{"S0", "S1", "S2", "S3", "D0", "D1", "PASS_A", "ADD", "AND", "INV", "ROTL",
                            "BGTZ taken", "BGTZ not taken", "BRA", "HALT", "PORTA read"};
      int cnt [16];
      cnt = '{n_src[0], n_src[1], n_src[2], n_src[3], n_dst[0], n_dst[1], n_alu[ALU_PASS_A], n_alu[ALU_ADD],
              n_alu[ALU_AND], n_alu[ALU_INV], n_alu[ALU_ROTL], n_bgtz_taken, n_bgtz_not, n_bra, n_halt, n_porta};
      for (int k = 0; k < 16; k++) begin
        $display("mechanism %-15s %0d", names[k], cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[k]); end
      end
      $display("mechanism PORTB write      %0d", n_portb);
      $display("mechanism memory write     %0d", n_memwr);
      $display("mechanism (Rs),Value no-op %0d", n_noop);
      checks += 3;
      if (n_portb == 0) begin failures++; $display("FAIL no PORTB write"); end
      if (n_memwr == 0) begin failures++; $display("FAIL no memory write"); end
      if (n_noop == 0) begin failures++; $display("FAIL no (Rs),Value no-op"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
