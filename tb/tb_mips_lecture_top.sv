// tb_mips_lecture_top: end-to-end test of both processors at the default
// sizes. Each runs a small program loaded through its load port:
//  - single-cycle: fills an array with sw in a bne loop, sums it in a
//    subroutine called with jal (return by jr), copies bytes with lb/sb in a
//    subroutine called with jalr, then beq, slt/slti/ori/andi/sub/and. Every
//    branch and jump has its delay slot filled with useful work.
//  - multi-cycle: sums an array with lw in a beq/j loop, stores the result.
// Results in memory and registers are checked, and the cycle count to the
// final spin loop is checked against the count worked out by hand
// (156 cycles at 1 instruction per cycle; 222 cycles at lw 5, sw/R 4,
// beq/j 3). Each mechanism is counted and must occur at least once: taken
// beq and bne, branch not taken, j, jal, jr, jalr, lw, lb, sw, sb on the
// single-cycle side, every controller state and taken/not-taken beq on the
// multi-cycle side.
module tb_mips_lecture_top;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 0, rst;
  logic        sc_load_we, mc_load_we;
  logic [31:0] sc_load_addr, sc_load_data, mc_load_addr, mc_load_data;
  logic [31:0] sc_pc, sc_npc, sc_instr, mc_pc, mc_ir;
  mc_state_e   mc_state;
  int checks = 0, failures = 0;

  mips_lecture_top dut (.*);

  always #5 clk = ~clk;

  logic [31:0] sprog [128];
  logic [31:0] mprog [128];

  // branch offset from the branch at word b to word t (sc: relative to NPC,
  // mc: relative to PC + 4; both are b + 1)
  function automatic int off(int b, int t);
    return t - (b + 1);
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp);
    end
  endtask

  // ---- mechanism counters ----
  typedef enum int {M_BEQ_T, M_BNE_T, M_BR_NT, M_J, M_JAL, M_JR, M_JALR,
                    M_LW, M_LB, M_SW, M_SB, M_MC_BEQ_T, M_MC_BEQ_NT, M_NUM} mech_e;
  int mech [M_NUM];
  int mc_state_seen [10];
  bit counting;

  always @(posedge clk) if (counting) begin
    sc_ctrl_t c;
    c = dut.u_sc.ctrl;
    if (c.npc_cnt_sig == SIG_BRANCH) begin
      if (dut.u_sc.mux_npc_cnt == NPC_TARGET) mech[c.mux_branch ? M_BNE_T : M_BEQ_T]++;
      else mech[M_BR_NT]++;
    end
    if (sc_instr[31:26] == OP_J)   mech[M_J]++;
    if (sc_instr[31:26] == OP_JAL && c.reg_write) mech[M_JAL]++;
    if (sc_instr[31:26] == OP_RTYPE && sc_instr[5:0] == FN_JR) mech[M_JR]++;
    if (sc_instr[31:26] == OP_RTYPE && sc_instr[5:0] == FN_JALR && c.mux_line_npc_plus4) mech[M_JALR]++;
    if (c.mux_datamem && !c.mem_byte) mech[M_LW]++;
    if (c.mux_datamem &&  c.mem_byte) mech[M_LB]++;
    if (c.rw && !c.mem_byte) mech[M_SW]++;
    if (c.rw &&  c.mem_byte) mech[M_SB]++;
    mc_state_seen[mc_state]++;
    if (mc_state == S8_BRANCH) mech[dut.u_mc.zero ? M_MC_BEQ_T : M_MC_BEQ_NT]++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sc_cycles, mc_cycles, cyc;
    rst = 1; counting = 0;
    sc_load_we = 0; mc_load_we = 0;
    sc_load_addr = 0; sc_load_data = 0; mc_load_addr = 0; mc_load_data = 0;
    foreach (mech[k]) mech[k] = 0;
    foreach (mc_state_seen[k]) mc_state_seen[k] = 0;
    foreach (sprog[k]) sprog[k] = enc_r(FN_OR, 0, 0, 0);
    foreach (mprog[k]) mprog[k] = 0;

    // ---------------- single-cycle program ----------------
    sprog[0]  = enc_i(OP_ADDI, 1, 0, 'h100);
    sprog[1]  = enc_i(OP_ADDI, 2, 0, 8);
    sprog[2]  = enc_i(OP_ADDI, 3, 0, 1);
    sprog[3]  = enc_i(OP_SW, 3, 1, 0);            // fill: mem[r1] = r3
    sprog[4]  = enc_i(OP_ADDI, 1, 1, 4);
    sprog[5]  = enc_i(OP_ADDI, 2, 2, -1);
    sprog[6]  = enc_i(OP_BNE, 0, 2, off(6, 3));
    sprog[7]  = enc_r(FN_ADD, 3, 3, 3);           // delay slot: r3 *= 2
    sprog[8]  = enc_j(OP_JAL, 32'(40 * 4));       // sum subroutine
    sprog[9]  = enc_i(OP_ADDI, 1, 0, 'h100);      // delay slot: its argument
    sprog[10] = enc_i(OP_SW, 4, 0, 'h200);        // mem[0x200] = sum
    sprog[11] = enc_i(OP_ADDI, 5, 0, 60 * 4);
    sprog[12] = enc_r(FN_JALR, 30, 5, 0);         // byte-copy subroutine
    sprog[13] = enc_i(OP_ADDI, 10, 0, 'h100);     // delay slot: source
    sprog[14] = enc_i(OP_LW, 6, 0, 'h200);
    sprog[15] = enc_i(OP_BEQ, 4, 6, off(15, 18));
    sprog[17] = enc_i(OP_ADDI, 7, 0, 99);         // skipped
    sprog[18] = enc_i(OP_SB, 6, 0, 'h204);
    sprog[19] = enc_i(OP_LB, 8, 0, 'h204);        // -1
    sprog[20] = enc_r(FN_SLT, 11, 8, 0);          // 1
    sprog[21] = enc_i(OP_SLTI, 12, 6, 256);       // 1
    sprog[22] = enc_i(OP_ORI, 13, 0, 'h55);
    sprog[23] = enc_i(OP_ANDI, 14, 13, 'h0f);     // 5
    sprog[24] = enc_r(FN_SUB, 15, 6, 13);         // 170
    sprog[25] = enc_r(FN_AND, 16, 15, 13);        // 0
    sprog[26] = enc_i(OP_SW, 15, 0, 'h208);
    sprog[27] = enc_j(OP_J, 32'(27 * 4));         // spin
    // sum of 8 words at r1 into r4, return through r31
    sprog[40] = enc_i(OP_ADDI, 4, 0, 0);
    sprog[41] = enc_i(OP_ADDI, 2, 0, 8);
    sprog[42] = enc_i(OP_LW, 9, 1, 0);
    sprog[43] = enc_i(OP_ADDI, 1, 1, 4);
    sprog[44] = enc_i(OP_ADDI, 2, 2, -1);
    sprog[45] = enc_i(OP_BNE, 0, 2, off(45, 42));
    sprog[46] = enc_r(FN_ADD, 4, 4, 9);           // delay slot
    sprog[47] = enc_r(FN_JR, 0, 31, 0);
    // copy 8 bytes from r10 to r10 + 0x200, return through r30
    sprog[60] = enc_i(OP_ADDI, 2, 0, 8);
    sprog[61] = enc_i(OP_LB, 17, 10, 0);
    sprog[62] = enc_i(OP_SB, 17, 10, 'h200);
    sprog[63] = enc_i(OP_ADDI, 10, 10, 1);
    sprog[64] = enc_i(OP_ADDI, 2, 2, -1);
    sprog[65] = enc_i(OP_BNE, 0, 2, off(65, 61));
    sprog[67] = enc_r(FN_JR, 0, 30, 0);

    // ---------------- multi-cycle program ----------------
    mprog[0]  = enc_i(OP_LW, 2, 0, 'h144);        // n = 8
    mprog[1]  = enc_i(OP_LW, 3, 0, 'h140);        // 1
    mprog[2]  = enc_i(OP_LW, 5, 0, 'h148);        // 4
    mprog[3]  = enc_i(OP_BEQ, 0, 2, off(3, 9));   // loop: exit when n == 0
    mprog[4]  = enc_i(OP_LW, 6, 1, 'h100);
    mprog[5]  = enc_r(FN_ADD, 4, 4, 6);
    mprog[6]  = enc_r(FN_ADD, 1, 1, 5);
    mprog[7]  = enc_r(FN_SUB, 2, 2, 3);
    mprog[8]  = enc_j(OP_J, 32'(3 * 4));
    mprog[9]  = enc_i(OP_SW, 4, 0, 'h180);        // 36
    mprog[10] = enc_r(FN_SLT, 7, 3, 5);           // 1
    mprog[11] = enc_r(FN_OR, 8, 3, 5);            // 5
    mprog[12] = enc_r(FN_AND, 9, 8, 5);           // 4
    mprog[13] = enc_i(OP_SW, 8, 0, 'h184);
    mprog[14] = enc_i(OP_BEQ, 0, 0, off(14, 14)); // spin
    for (int k = 0; k < 8; k++) mprog[64 + k] = 32'(k + 1);
    mprog[80] = 1; mprog[81] = 8; mprog[82] = 4;

    @(posedge clk); #1;
    for (int k = 0; k < 128; k++) begin
      sc_load_we = 1; sc_load_addr = 32'(k * 4); sc_load_data = sprog[k];
      mc_load_we = 1; mc_load_addr = 32'(k * 4); mc_load_data = mprog[k];
      @(posedge clk); #1;
    end
    sc_load_we = 0; mc_load_we = 0;
    @(posedge clk); #1;
    rst = 0; counting = 1;
    sc_cycles = -1; mc_cycles = -1;
    for (cyc = 0; cyc < 400 && (sc_cycles < 0 || mc_cycles < 0); cyc++) begin
      if (sc_cycles < 0 && sc_pc == 32'(27 * 4)) sc_cycles = cyc;
      if (mc_cycles < 0 && mc_state == S0_FETCH && mc_pc == 32'(14 * 4)) mc_cycles = cyc;
      @(posedge clk); #1;
    end
    repeat (10) @(posedge clk);
    #1 counting = 0;

    check("sc cycles to spin", 32'(sc_cycles), 156);
    check("mc cycles to spin", 32'(mc_cycles), 222);
    // single-cycle results
    for (int k = 0; k < 8; k++) check($sformatf("sc array[%0d]", k), dut.u_sc.u_dmem.mem[64 + k], 32'(1 << k));
    check("sc sum",      dut.u_sc.u_dmem.mem['h200 >> 2], 255);
    check("sc sb byte",  32'(dut.u_sc.u_dmem.mem['h204 >> 2][7:0]), 'hff);
    check("sc copy 0",   dut.u_sc.u_dmem.mem['h300 >> 2], 1);
    check("sc copy 1",   dut.u_sc.u_dmem.mem['h304 >> 2], 2);
    check("sc sub",      dut.u_sc.u_dmem.mem['h208 >> 2], 170);
    check("sc r7",  dut.u_sc.u_rf.regs[7],  0);
    check("sc r8",  dut.u_sc.u_rf.regs[8],  32'hffff_ffff);
    check("sc r11", dut.u_sc.u_rf.regs[11], 1);
    check("sc r12", dut.u_sc.u_rf.regs[12], 1);
    check("sc r14", dut.u_sc.u_rf.regs[14], 5);
    check("sc r16", dut.u_sc.u_rf.regs[16], 0);
    check("sc r31", dut.u_sc.u_rf.regs[31], 40);
    check("sc r30", dut.u_sc.u_rf.regs[30], 56);
    // multi-cycle results
    check("mc sum", dut.u_mc.u_mem.mem['h180 >> 2], 36);
    check("mc or",  dut.u_mc.u_mem.mem['h184 >> 2], 5);
    check("mc r7",  dut.u_mc.u_rf.regs[7], 1);
    check("mc r9",  dut.u_mc.u_rf.regs[9], 4);

    foreach (mech[k]) begin
      checks++;
      if (mech[k] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", k);
      end
    end
    for (int s = 0; s < 10; s++) begin
      checks++;
      if (mc_state_seen[s] == 0) begin
        failures++;
        $display("FAIL multi-cycle state %0d never visited", s);
      end
    end
    for (mech_e m = M_BEQ_T; m < M_NUM; m = mech_e'(int'(m) + 1))
      $display("%-12s %0d", m.name(), mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
