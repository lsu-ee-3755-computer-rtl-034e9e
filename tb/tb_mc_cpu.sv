// tb_mc_cpu: runs the multi-cycle processor against an instruction-set
// reference model (no delay slot; a taken beq goes to PC + 4 + offset*4).
// Each time the controller returns to state 0 an instruction has finished:
// PC, all registers and the memory word it may have stored are compared
// with the model, and the cycles it took are checked (lw 5, sw 4, R-type 4,
// beq 3, j 3). A directed program and several random ones are run, then a
// program drawn with the instruction mix 24% loads, 12% stores, 44% ALU,
// 18% branches, 2% jumps (forward only); its average cycles per instruction
// is reported and compared with the per-class step counts.
module tb_mc_cpu;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  localparam int DEPTH = 256;

  logic        clk = 0, rst;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] pc, ir;
  mc_state_e   state;
  int checks = 0, failures = 0;
  int n_lw, n_sw, n_r, n_taken, n_not_taken, n_j;

  mc_cpu #(.MEM_DEPTH(DEPTH)) dut (.clk, .rst, .load_we, .load_addr, .load_data,
                                   .pc, .ir, .state);

  always #5 clk = ~clk;

  logic [31:0] prog  [DEPTH];
  logic [31:0] m_mem [DEPTH];
  logic [31:0] m_reg [32];
  logic [31:0] m_pc;

  // executes one instruction, returns its expected cycle count
  function automatic int model_step();
    logic [31:0] i, rs, rt, imm, ea;
    i   = m_mem[m_pc[$clog2(DEPTH)+1:2]];
    rs  = m_reg[i[25:21]]; rt = m_reg[i[20:16]];
    imm = sext16(i[15:0]);
    ea  = rs + imm;
    m_pc = m_pc + 4;
    case (i[31:26])
      OP_LW: begin
        if (i[20:16] != 0) m_reg[i[20:16]] = m_mem[ea[$clog2(DEPTH)+1:2]];
        n_lw++; return 5;
      end
      OP_SW: begin m_mem[ea[$clog2(DEPTH)+1:2]] = rt; n_sw++; return 4; end
      OP_RTYPE: begin
        logic [31:0] r;
        case (i[5:0])
          FN_AND:  r = rs & rt;
          FN_OR:   r = rs | rt;
          FN_SLT:  r = slt32(rs, rt);
          FN_ADD:  r = rs + rt;
          FN_SUB:  r = rs - rt;
          default: r = rs & rt;
        endcase
        if (i[15:11] != 0) m_reg[i[15:11]] = r;
        n_r++; return 4;
      end
      OP_BEQ: begin
        if (rs == rt) begin m_pc = m_pc + {imm[29:0], 2'b00}; n_taken++; end
        else n_not_taken++;
        return 3;
      end
      OP_J: begin m_pc = {m_pc[31:28], i[25:0], 2'b00}; n_j++; return 3; end
      default: return 2;
    endcase
  endfunction

  int total_cycles;

  task automatic load_and_run(int ninstr);
    rst = 1;
    load_we = 1;
    for (int k = 0; k < DEPTH; k++) begin
      load_addr = 32'(k * 4); load_data = prog[k]; m_mem[k] = prog[k];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    foreach (m_reg[k]) m_reg[k] = 0;
    m_pc = 0;
    rst = 0;
    for (int n = 0; n < ninstr; n++) begin
      int exp_cycles, cycles;
      exp_cycles = model_step();
      cycles = 0;
      do begin
        @(posedge clk); #1;
        cycles++;
      end while (state != S0_FETCH && cycles < 10);
      total_cycles += cycles;
      checks++;
      if (cycles != exp_cycles || pc !== m_pc) begin
        failures++;
        $display("FAIL instr %0d (%h): cycles %0d exp %0d, pc %h exp %h", n, ir, cycles, exp_cycles, pc, m_pc);
      end
      for (int r = 1; r < 32; r++) begin
        checks++;
        if (dut.u_rf.regs[r] !== m_reg[r]) begin
          failures++;
          $display("FAIL instr %0d (%h): r%0d=%h exp %h", n, ir, r, dut.u_rf.regs[r], m_reg[r]);
        end
      end
    end
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (dut.u_mem.mem[k] !== m_mem[k]) begin
        failures++;
        $display("FAIL mem[%0d]=%h exp %h", k, dut.u_mem.mem[k], m_mem[k]);
      end
    end
  endtask

  function automatic logic [31:0] rand_instr();
    int rd, rs, rt;
    rd = $urandom % 32; rs = $urandom % 8; rt = $urandom % 32;
    case ($urandom % 12)
      0:  return enc_r(FN_AND, rd, rs, rt);
      1:  return enc_r(FN_OR,  rd, rs, rt);
      2:  return enc_r(FN_SLT, rd, rs, rt);
      3:  return enc_r(FN_ADD, rd, rs, rt);
      4:  return enc_r(FN_SUB, rd, rs, rt);
      5, 6: return enc_i(OP_LW, rt, rs, int'($urandom % 1024));
      7:  return enc_i(OP_SW, rt, rs, 512 + int'($urandom % 512));
      8:  return enc_i(OP_BEQ, rt, rs, int'($urandom % 16) - 8);
      9:  return enc_i(OP_BEQ, rs, rs, int'($urandom % 8));
      10: return enc_j(OP_J, 32'(($urandom % (DEPTH / 2)) * 4));
      default: return enc_r(FN_ADD, rd, rs, rt);
    endcase
  endfunction

  function automatic logic [31:0] mix_instr(int k, int n);
    int c, rd, rs, rt;
    c  = $urandom % 100;
    rd = 1 + $urandom % 15; rs = $urandom % 16; rt = 1 + $urandom % 15;
    if (c < 24) return enc_i(OP_LW, rt, 0, 512 + int'($urandom % 512));
    if (c < 36) return enc_i(OP_SW, rt, 0, 512 + int'($urandom % 512));
    if (c < 80) case ($urandom % 5)
      0: return enc_r(FN_ADD, rd, rs, rt);
      1: return enc_r(FN_SUB, rd, rs, rt);
      2: return enc_r(FN_AND, rd, rs, rt);
      3: return enc_r(FN_OR,  rd, rs, rt);
      default: return enc_r(FN_SLT, rd, rs, rt);
    endcase
    if (c < 98 && k + 5 < n) return enc_i(OP_BEQ, rt, ($urandom % 3 == 0) ? rt : rs, int'($urandom % 3));
    if (k + 6 < n) return enc_j(OP_J, 32'((k + 2 + $urandom % 4) * 4));
    return enc_r(FN_ADD, rd, rs, rt);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    n_lw = 0; n_sw = 0; n_r = 0; n_taken = 0; n_not_taken = 0; n_j = 0;
    total_cycles = 0;
    // directed: r3 = mem[100] + mem[101]; count r4 down; store; jump to end
    foreach (prog[k]) prog[k] = 0;
    prog[0]  = enc_i(OP_LW, 1, 0, 400);          // r1 = 7
    prog[1]  = enc_i(OP_LW, 2, 0, 404);          // r2 = -3
    prog[2]  = enc_r(FN_ADD, 3, 1, 2);           // r3 = 4
    prog[3]  = enc_i(OP_LW, 5, 0, 408);          // r5 = 1
    prog[4]  = enc_r(FN_SUB, 4, 4, 5);           // loop: r4 = r4 - 1
    prog[5]  = enc_r(FN_SUB, 3, 3, 5);           // r3 = r3 - 1
    prog[6]  = enc_i(OP_BEQ, 0, 3, 1);           // if r3 == 0 goto 8
    prog[7]  = enc_j(OP_J, 32'd4 * 4);           // goto loop
    prog[8]  = enc_r(FN_SLT, 6, 2, 1);           // r6 = 1
    prog[9]  = enc_r(FN_AND, 7, 1, 2);           // r7 = 7 & -3 = 5
    prog[10] = enc_r(FN_OR, 8, 1, 2);            // r8 = -1
    prog[11] = enc_i(OP_SW, 4, 0, 412);          // mem[103] = -4
    prog[12] = enc_i(OP_BEQ, 0, 0, -1);          // spin
    prog[100] = 32'd7;
    prog[101] = -32'sd3;
    prog[102] = 32'd1;
    load_and_run(40);
    checks++;
    if (dut.u_mem.mem[103] !== -32'sd4 || dut.u_rf.regs[7] !== 5 || dut.u_rf.regs[8] !== 32'hffff_ffff) begin
      failures++;
      $display("FAIL directed mem[103]=%h r7=%h r8=%h", dut.u_mem.mem[103], dut.u_rf.regs[7], dut.u_rf.regs[8]);
    end
    for (int p = 0; p < 6; p++) begin
      for (int k = 0; k < DEPTH; k++) prog[k] = (k < DEPTH / 2) ? rand_instr() : $urandom;
      load_and_run(300);
    end
    // ---- instruction-mix program ----
    begin
      int l0, s0, r0, b0, j0, nl, ns, nr, nb, nj, executed, exp_total;
      int n;
      n = DEPTH / 2 - 4;
      for (int k = 0; k < DEPTH; k++) prog[k] = (k < DEPTH / 2) ? 32'd0 : $urandom;
      for (int k = 0; k < n; k++) prog[k] = mix_instr(k, n);
      prog[n] = enc_i(OP_BEQ, 0, 0, -1);
      l0 = n_lw; s0 = n_sw; r0 = n_r; b0 = n_taken + n_not_taken; j0 = n_j;
      // run until the spin: count the instructions the model executes
      executed = 0;
      total_cycles = 0;
      load_and_run(n + 1);
      nl = n_lw - l0; ns = n_sw - s0; nr = n_r - r0; nb = n_taken + n_not_taken - b0; nj = n_j - j0;
      executed = nl + ns + nr + nb + nj;
      exp_total = 5 * nl + 4 * ns + 4 * nr + 3 * nb + 3 * nj;
      $display("mix run: %0d instructions (lw %0d sw %0d R %0d beq %0d j %0d) in %0d cycles, CPI %0.2f",
               executed, nl, ns, nr, nb, nj, total_cycles, real'(total_cycles) / real'(executed));
      checks++;
      if (total_cycles != exp_total || nl == 0 || ns == 0 || nr == 0 || nb == 0) begin
        failures++;
        $display("FAIL mix run: %0d cycles, expected %0d", total_cycles, exp_total);
      end
    end
    $display("lw=%0d sw=%0d R=%0d beq taken=%0d not taken=%0d j=%0d",
             n_lw, n_sw, n_r, n_taken, n_not_taken, n_j);
    checks++;
    if (n_lw == 0 || n_sw == 0 || n_r == 0 || n_taken == 0 || n_not_taken == 0 || n_j == 0) begin
      failures++;
      $display("FAIL some instruction class never executed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
