// tb_sc_cpu: runs the single-cycle processor against an instruction-set
// reference model kept in the testbench (with the delay-slot rule: the
// instruction after a branch or jump always executes, jal/jalr link PC + 8).
// After every clock the PC, NPC and all 32 registers are compared with the
// model, which also checks the one-instruction-per-cycle rate; the data
// memory is compared at the end. Two programs run: a directed one that
// uses every instruction and every next-address path, then a long random one.
// A third phase runs a program drawn with the instruction mix 24% loads,
// 12% stores, 44% ALU, 18% branches, 2% jumps (forward branches and jumps
// only, so it runs to its end) and reports the dynamic mix and the cycles.
// Both the decoder control (dut) and the ROM control (dut_rom) are tested.
module tb_sc_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  localparam int DEPTH = 256;
  localparam int AW    = $clog2(DEPTH);

  logic        clk = 0, rst;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] pc, npc, instr, pc_r, npc_r, instr_r;
  int checks = 0, failures = 0;

  sc_cpu #(.IMEM_DEPTH(DEPTH), .DMEM_DEPTH(DEPTH)) dut (
    .clk, .rst, .load_we, .load_addr, .load_data, .pc, .npc, .instr);
  sc_cpu #(.IMEM_DEPTH(DEPTH), .DMEM_DEPTH(DEPTH), .USE_ROM_CONTROL(1'b1)) dut_rom (
    .clk, .rst, .load_we, .load_addr, .load_data, .pc(pc_r), .npc(npc_r), .instr(instr_r));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [31:0] prog [DEPTH];
  logic [31:0] m_reg [32];
  logic [7:0]  m_mem [DEPTH*4];
  logic [31:0] m_pc, m_npc;
  int n_taken, n_not_taken, n_jump, n_jreg, n_load, n_store, n_alu;

  function automatic int maddr(logic [31:0] a);
    return int'(a[AW+1:0]);
  endfunction

  task automatic model_step();
    logic [5:0] o6;
    o6 = prog[m_pc[AW+1:2]][31:26];
    if (o6 inside {OP_ANDI, OP_ORI, OP_SLTI, OP_ADDI} ||
        (o6 == OP_RTYPE && !(prog[m_pc[AW+1:2]][5:0] inside {FN_JR, FN_JALR}))) n_alu++;
    model_step_core();
  endtask

  task automatic model_step_core();
    logic [31:0] ir, rs, rt, imm, nn, res, ea, w;
    logic [5:0]  op, fn;
    int          dst;
    bit          wr;
    ir  = prog[m_pc[AW+1:2]];
    op  = ir[31:26]; fn = ir[5:0];
    rs  = m_reg[ir[25:21]]; rt = m_reg[ir[20:16]];
    imm = sext16(ir[15:0]);
    nn  = m_npc + 4;
    wr  = 0; dst = 0; res = 0;
    ea  = rs + imm;
    case (op)
      OP_RTYPE: case (fn)
        FN_AND:  begin wr = 1; dst = ir[15:11]; res = rs & rt; end
        FN_OR:   begin wr = 1; dst = ir[15:11]; res = rs | rt; end
        FN_SLT:  begin wr = 1; dst = ir[15:11]; res = slt32(rs, rt); end
        FN_ADD:  begin wr = 1; dst = ir[15:11]; res = rs + rt; end
        FN_SUB:  begin wr = 1; dst = ir[15:11]; res = rs - rt; end
        FN_JR:   begin nn = rs; n_jreg++; end
        FN_JALR: begin nn = rs; wr = 1; dst = ir[15:11]; res = m_npc + 4; n_jreg++; end
        default: ;
      endcase
      OP_ANDI: begin wr = 1; dst = ir[20:16]; res = rs & imm; end
      OP_ORI:  begin wr = 1; dst = ir[20:16]; res = rs | imm; end
      OP_SLTI: begin wr = 1; dst = ir[20:16]; res = slt32(rs, imm); end
      OP_ADDI: begin wr = 1; dst = ir[20:16]; res = rs + imm; end
      OP_LW: begin
        int b;
        b = maddr(ea) & ~3;
        wr = 1; dst = ir[20:16];
        res = {m_mem[b+3], m_mem[b+2], m_mem[b+1], m_mem[b]};
        n_load++;
      end
      OP_LB: begin
        wr = 1; dst = ir[20:16];
        res = {{24{m_mem[maddr(ea)][7]}}, m_mem[maddr(ea)]};
        n_load++;
      end
      OP_SW: begin
        int b;
        b = maddr(ea) & ~3;
        for (int k = 0; k < 4; k++) m_mem[b+k] = rt[8*k +: 8];
        n_store++;
      end
      OP_SB: begin m_mem[maddr(ea)] = rt[7:0]; n_store++; end
      OP_BEQ, OP_BNE: begin
        if ((rs == rt) == (op == OP_BEQ)) begin
          nn = m_npc + {imm[29:0], 2'b00};
          n_taken++;
        end else n_not_taken++;
      end
      OP_J:   begin nn = {m_npc[31:28], ir[25:0], 2'b00}; n_jump++; end
      OP_JAL: begin
        nn = {m_npc[31:28], ir[25:0], 2'b00};
        wr = 1; dst = 31; res = m_npc + 4; n_jump++;
      end
      default: ;
    endcase
    if (wr && dst != 0) m_reg[dst] = res;
    m_pc  = m_npc;
    m_npc = nn;
  endtask

  // ---------------- helpers ----------------
  task automatic load_and_reset(int n);
    rst = 1;
    load_we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      load_addr = 32'(i * 4); load_data = prog[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    foreach (m_reg[i]) m_reg[i] = 0;
    m_pc = 0; m_npc = 4;
    // the data memory has no reset: copy its contents into the model
    for (int i = 0; i < DEPTH; i++) begin
      dut.u_dmem.mem[i] = 32'(i * 32'h01010101) ^ 32'h5a00_00a5;
      dut_rom.u_dmem.mem[i] = dut.u_dmem.mem[i];
      for (int k = 0; k < 4; k++) m_mem[i*4+k] = dut.u_dmem.mem[i][8*k +: 8];
    end
    rst = 0;
    for (int c = 0; c < n; c++) begin
      @(posedge clk);
      model_step();
      #1;
      checks++;
      if (pc !== m_pc || npc !== m_npc || pc_r !== m_pc || npc_r !== m_npc) begin
        failures++;
        $display("FAIL cycle %0d pc=%h/%h npc=%h/%h exp %h %h", c, pc, pc_r, npc, npc_r, m_pc, m_npc);
      end
      for (int r = 0; r < 32; r++) begin
        checks++;
        if (dut.u_rf.regs[r] !== m_reg[r] && r != 0 || dut_rom.u_rf.regs[r] !== m_reg[r] && r != 0) begin
          failures++;
          $display("FAIL cycle %0d r%0d=%h/%h exp %h", c, r, dut.u_rf.regs[r], dut_rom.u_rf.regs[r], m_reg[r]);
        end
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== {m_mem[i*4+3], m_mem[i*4+2], m_mem[i*4+1], m_mem[i*4]} ||
          dut_rom.u_dmem.mem[i] !== dut.u_dmem.mem[i]) begin
        failures++;
        $display("FAIL mem[%0d]=%h exp %h", i, dut.u_dmem.mem[i],
                 {m_mem[i*4+3], m_mem[i*4+2], m_mem[i*4+1], m_mem[i*4]});
      end
    end
  endtask

  function automatic logic [31:0] rand_instr();
    int rd, rs, rt, imm;
    rd = $urandom % 32; rs = $urandom % 32; rt = $urandom % 32;
    imm = int'($urandom % 65536);
    case ($urandom % 24)
      0:  return enc_r(FN_AND, rd, rs, rt);
      1:  return enc_r(FN_OR,  rd, rs, rt);
      2:  return enc_r(FN_SLT, rd, rs, rt);
      3:  return enc_r(FN_ADD, rd, rs, rt);
      4:  return enc_r(FN_SUB, rd, rs, rt);
      5:  return enc_i(OP_ANDI, rt, rs, imm);
      6:  return enc_i(OP_ORI,  rt, rs, imm);
      7:  return enc_i(OP_SLTI, rt, rs, imm);
      8:  return enc_i(OP_ADDI, rt, rs, imm);
      9:  return enc_i(OP_LW, rt, rs, imm);
      10: return enc_i(OP_LB, rt, rs, imm);
      11: return enc_i(OP_SW, rt, rs, imm);
      12: return enc_i(OP_SB, rt, rs, imm);
      13: return enc_i(OP_BEQ, rt, rs, int'($urandom % 16) - 8);
      14: return enc_i(OP_BNE, rt, rs, int'($urandom % 16) - 8);
      15: return enc_j(($urandom % 2) ? OP_J : OP_JAL, 32'(($urandom % DEPTH) * 4));
      16: return enc_r(($urandom % 2) ? FN_JR : FN_JALR, rd, rs, 0);
      17, 19, 20, 21, 22: return enc_i(OP_ADDI, rt, 0, int'($urandom % 64));
      default: return {6'h3f, 26'($urandom)};   // not in the subset
    endcase
  endfunction

  // one slot of the instruction-mix program at word k of a program of n words
  function automatic logic [31:0] mix_instr(int k, int n);
    int c, rd, rs, rt;
    c  = $urandom % 100;
    rd = 1 + $urandom % 15; rs = $urandom % 16; rt = 1 + $urandom % 15;
    if (c < 24) return enc_i(($urandom % 4 == 0) ? OP_LB : OP_LW, rt, 0, int'($urandom % 1024));
    if (c < 36) return enc_i(($urandom % 4 == 0) ? OP_SB : OP_SW, rt, 0, int'($urandom % 1024));
    if (c < 80) case ($urandom % 9)
      0: return enc_r(FN_ADD, rd, rs, rt);
      1: return enc_r(FN_SUB, rd, rs, rt);
      2: return enc_r(FN_AND, rd, rs, rt);
      3: return enc_r(FN_OR,  rd, rs, rt);
      4: return enc_r(FN_SLT, rd, rs, rt);
      5: return enc_i(OP_ADDI, rt, rs, int'($urandom % 8));
      6: return enc_i(OP_ANDI, rt, rs, int'($urandom % 65536));
      7: return enc_i(OP_ORI,  rt, rs, int'($urandom % 16));
      default: return enc_i(OP_SLTI, rt, rs, int'($urandom % 8));
    endcase
    if (c < 98 && k + 5 < n) return enc_i(($urandom % 2) ? OP_BEQ : OP_BNE, rt, rs, int'(1 + $urandom % 3));
    if (k + 6 < n) return enc_j(OP_J, 32'((k + 2 + $urandom % 4) * 4));
    return enc_r(FN_ADD, rd, rs, rt);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    n_taken = 0; n_not_taken = 0; n_jump = 0; n_jreg = 0; n_load = 0; n_store = 0; n_alu = 0;
    // ---- directed program: sum 1..5, byte and word memory, all jumps ----
    foreach (prog[i]) prog[i] = 0;
    prog[0]  = enc_i(OP_ADDI, 1, 0, 5);          // r1 = 5 (counter)
    prog[1]  = enc_i(OP_ADDI, 2, 0, 0);          // r2 = 0 (sum)
    prog[2]  = enc_r(FN_ADD, 2, 2, 1);           // loop: r2 += r1
    prog[3]  = enc_i(OP_ADDI, 1, 1, -1);         // r1--
    prog[4]  = enc_i(OP_BNE, 0, 1, -3);          // bne r1, r0, loop (target = npc - 12)
    prog[5]  = enc_r(FN_OR, 0, 0, 0);            // delay slot
    prog[6]  = enc_i(OP_SW, 2, 0, 64);           // mem[64] = 15
    prog[7]  = enc_i(OP_ADDI, 3, 0, -128);       // r3 = 0xffffff80
    prog[8]  = enc_i(OP_SB, 3, 0, 69);           // byte 69 = 0x80
    prog[9]  = enc_i(OP_LB, 4, 0, 69);           // r4 = sext(0x80)
    prog[10] = enc_i(OP_LW, 5, 0, 64);           // r5 = 15
    prog[11] = enc_r(FN_SLT, 6, 4, 5);           // r6 = 1
    prog[12] = enc_i(OP_SLTI, 7, 5, 3);          // r7 = 0
    prog[13] = enc_i(OP_ANDI, 8, 5, 6);          // r8 = 6
    prog[14] = enc_i(OP_ORI, 9, 5, 16);          // r9 = 31
    prog[15] = enc_r(FN_SUB, 10, 9, 5);          // r10 = 16
    prog[16] = enc_r(FN_AND, 11, 10, 9);         // r11 = 16
    prog[17] = enc_i(OP_BEQ, 10, 11, 2);         // taken -> 20
    prog[18] = enc_i(OP_ADDI, 12, 0, 1);         // delay slot
    prog[19] = enc_i(OP_ADDI, 13, 0, 1);         // skipped
    prog[20] = enc_j(OP_JAL, 32'd40 * 4);        // call 40, r31 = 88
    prog[21] = enc_i(OP_ADDI, 14, 0, 7);         // delay slot
    prog[22] = enc_i(OP_ADDI, 15, 0, 48 * 4);    // r15 = 192
    prog[23] = enc_r(FN_JALR, 16, 15, 0);        // call 48, r16 = 96
    prog[24] = enc_i(OP_ADDI, 17, 0, 2);         // delay slot
    prog[25] = enc_i(OP_BEQ, 0, 1, 5);           // r1 = 0 -> taken? r1==r0: yes
    prog[26] = enc_i(OP_BNE, 0, 0, 5);           // delay slot, not taken
    prog[31] = enc_j(OP_J, 32'd31 * 4);          // end: spin
    prog[32] = enc_r(FN_OR, 0, 0, 0);
    prog[40] = enc_i(OP_ADDI, 18, 0, 3);         // subroutine
    prog[41] = enc_r(FN_JR, 0, 31, 0);           // return
    prog[42] = enc_i(OP_ADDI, 19, 0, 4);         // delay slot
    prog[48] = enc_r(FN_JR, 0, 16, 0);           // second subroutine returns
    prog[49] = enc_i(OP_ADDI, 20, 0, 9);
    load_and_reset(80);
    checks++;
    if (dut.u_rf.regs[2] !== 15 || dut.u_rf.regs[4] !== 32'hffff_ff80 || dut.u_rf.regs[31] !== 88) begin
      failures++;
      $display("FAIL directed results r2=%0d r4=%h r31=%0d", dut.u_rf.regs[2], dut.u_rf.regs[4], dut.u_rf.regs[31]);
    end
    // ---- random program ----
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < DEPTH; i++) prog[i] = rand_instr();
      load_and_reset(400);
    end
    // ---- instruction-mix program ----
    begin
      int a0, l0, s0, b0, j0, n;
      n = DEPTH - 8;
      for (int i = 0; i < DEPTH; i++) prog[i] = enc_r(FN_OR, 0, 0, 0);
      for (int i = 0; i < n; i++) prog[i] = mix_instr(i, n);
      prog[n] = enc_j(OP_J, 32'(n * 4));
      a0 = n_alu; l0 = n_load; s0 = n_store; b0 = n_taken + n_not_taken; j0 = n_jump;
      load_and_reset(n + 4);
      $display("mix run: %0d cycles, alu=%0d load=%0d store=%0d branch=%0d jump=%0d",
               n + 4, n_alu - a0, n_load - l0, n_store - s0, n_taken + n_not_taken - b0, n_jump - j0);
      checks++;
      if (n_load == l0 || n_store == s0 || n_alu == a0 || n_taken + n_not_taken == b0) begin
        failures++;
        $display("FAIL instruction-mix program missed a class");
      end
    end
    $display("taken=%0d not_taken=%0d jump=%0d jreg=%0d load=%0d store=%0d",
             n_taken, n_not_taken, n_jump, n_jreg, n_load, n_store);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jump == 0 || n_jreg == 0 || n_load == 0 || n_store == 0) begin
      failures++;
      $display("FAIL some path never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
