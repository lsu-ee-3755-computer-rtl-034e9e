// tb_mc_control: drives the multi-cycle controller with each opcode class
// and checks the state sequence (0-1-2-3-4 for lw, 0-1-2-5 sw, 0-1-6-7
// R-type, 0-1-8 beq, 0-1-9 j, 0-1 for an opcode outside the subset), hence
// the cycle count per instruction, and the key Moore outputs of each state.
module tb_mc_control;
  import mips_pkg::*;
  logic      clk = 0, rst;
  logic [5:0] op;
  mc_state_e state;
  mc_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  mc_control dut (.clk, .rst, .op, .state, .ctrl);

  always #5 clk = ~clk;

  function automatic bit outputs_ok(mc_state_e s, mc_ctrl_t c);
    case (s)
      S0_FETCH:     return c.mem_read && c.ir_write && c.pc_write && !c.iord &&
                           c.alu_src_b == SRCB_FOUR && !c.alu_src_a && c.pc_source == PCSRC_ALU &&
                           !c.reg_write && !c.mem_write;
      S1_DECODE:    return c.alu_src_b == SRCB_BOFF && !c.alu_src_a && !c.pc_write &&
                           !c.reg_write && !c.mem_write && !c.ir_write;
      S2_MEM_ADDR:  return c.alu_src_a && c.alu_src_b == SRCB_IMM && c.alu_ctl == ALUCTL_ADD &&
                           !c.mem_write && !c.reg_write;
      S3_MEM_READ:  return c.mem_read && c.iord && !c.ir_write && !c.reg_write;
      S4_LOAD_WB:   return c.reg_write && c.mem_to_reg && !c.reg_dst && !c.mem_write;
      S5_MEM_WRITE: return c.mem_write && c.iord && !c.reg_write;
      S6_EXECUTE:   return c.alu_src_a && c.alu_src_b == SRCB_B && c.alu_ctl == ALUCTL_FUNCT &&
                           !c.reg_write;
      S7_R_WB:      return c.reg_write && c.reg_dst && !c.mem_to_reg;
      S8_BRANCH:    return c.pc_write_cond && !c.pc_write && c.alu_ctl == ALUCTL_SUB &&
                           c.pc_source == PCSRC_ALUOUT && c.alu_src_a && c.alu_src_b == SRCB_B;
      S9_JUMP:      return c.pc_write && c.pc_source == PCSRC_JUMP && !c.reg_write;
      default:      return 0;
    endcase
  endfunction

  task automatic run(string name, logic [5:0] o, mc_state_e exp [$]);
    mc_state_e seen [$];
    op = o;
    // we are in S0 here; collect states until the next S0
    do begin
      seen.push_back(state);
      checks++;
      if (!outputs_ok(state, ctrl)) begin
        failures++;
        $display("FAIL %s: outputs of state %0d: %p", name, state, ctrl);
      end
      @(posedge clk); #1;
    end while (state != S0_FETCH && seen.size() < 12);
    checks++;
    if (seen != exp) begin
      failures++;
      $display("FAIL %s: states %p expected %p", name, seen, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; op = 0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (state != S0_FETCH) begin failures++; $display("FAIL reset state %0d", state); end
    repeat (3) begin
      run("lw",   OP_LW,    '{S0_FETCH, S1_DECODE, S2_MEM_ADDR, S3_MEM_READ, S4_LOAD_WB});
      run("sw",   OP_SW,    '{S0_FETCH, S1_DECODE, S2_MEM_ADDR, S5_MEM_WRITE});
      run("R",    OP_RTYPE, '{S0_FETCH, S1_DECODE, S6_EXECUTE, S7_R_WB});
      run("beq",  OP_BEQ,   '{S0_FETCH, S1_DECODE, S8_BRANCH});
      run("j",    OP_J,     '{S0_FETCH, S1_DECODE, S9_JUMP});
      run("other", 6'h3f,   '{S0_FETCH, S1_DECODE});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
