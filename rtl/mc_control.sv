// mc_control: hardwired controller of the multi-cycle MIPS subset.
//
// A Moore finite state machine with ten states: the outputs depend only on
// the current state, the next state on the state and the opcode.
//   S0 fetch:  IR = Memory[PC]; PC = PC + 4                       -> S1
//   S1 decode: A = rs, B = rt; ALUOut = PC + (sext(imm) << 2)
//              -> S2 (lw, sw), S6 (R-type), S8 (beq), S9 (j)
//   S2 address: ALUOut = A + sext(imm)            -> S3 (lw), S5 (sw)
//   S3 MDR = Memory[ALUOut] -> S4     S4 rt = MDR             -> S0
//   S5 Memory[ALUOut] = B   -> S0
//   S6 ALUOut = A op B      -> S7     S7 rd = ALUOut          -> S0
//   S8 if (A == B) PC = ALUOut        -> S0
//   S9 PC = {PC[31:28], IR[25:0], 00} -> S0
// So lw takes 5 cycles, sw and R-type 4, beq and j 3. The states, their
// register transfers and the transitions follow the design's state list.
// The names and encoding of the output signals (mc_ctrl_t), the load
// destination rt, the return to S0 on an opcode outside the subset and the
// synchronous active-high reset to S0 are this design's own choices.
// Assertions check that the state stays legal and that no state both reads
// and writes memory or drives both PC write enables.
module mc_control
  import mips_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic [5:0] op,
  output mc_state_e state,
  output mc_ctrl_t  ctrl
);
  mc_state_e next;

  always_comb begin
    next = S0_FETCH;
    unique case (state)
      S0_FETCH:  next = S1_DECODE;
      S1_DECODE: begin
        case (op)
          OP_LW, OP_SW: next = S2_MEM_ADDR;
          OP_RTYPE:     next = S6_EXECUTE;
          OP_BEQ:       next = S8_BRANCH;
          OP_J:         next = S9_JUMP;
          default:      next = S0_FETCH;
        endcase
      end
      S2_MEM_ADDR: next = (op == OP_LW) ? S3_MEM_READ  :
                          (op == OP_SW) ? S5_MEM_WRITE : S0_FETCH;
      S3_MEM_READ: next = S4_LOAD_WB;
      S6_EXECUTE:  next = S7_R_WB;
      default:     next = S0_FETCH;   // S4, S5, S7, S8, S9
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S0_FETCH;
    else     state <= next;
  end

  always_comb begin
    ctrl = '{alu_src_b: SRCB_B, alu_ctl: ALUCTL_ADD, pc_source: PCSRC_ALU,
             default: 1'b0};
    unique case (state)
      S0_FETCH: begin
        ctrl.mem_read  = 1'b1;
        ctrl.ir_write  = 1'b1;
        ctrl.alu_src_b = SRCB_FOUR;
        ctrl.pc_write  = 1'b1;
      end
      S1_DECODE:   ctrl.alu_src_b = SRCB_BOFF;
      S2_MEM_ADDR: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = SRCB_IMM;
      end
      S3_MEM_READ: begin
        ctrl.mem_read = 1'b1;
        ctrl.iord     = 1'b1;
      end
      S4_LOAD_WB: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      S5_MEM_WRITE: begin
        ctrl.mem_write = 1'b1;
        ctrl.iord      = 1'b1;
      end
      S6_EXECUTE: begin
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_ctl   = ALUCTL_FUNCT;
      end
      S7_R_WB: begin
        ctrl.reg_write = 1'b1;
        ctrl.reg_dst   = 1'b1;
      end
      S8_BRANCH: begin
        ctrl.alu_src_a     = 1'b1;
        ctrl.alu_ctl       = ALUCTL_SUB;
        ctrl.pc_write_cond = 1'b1;
        ctrl.pc_source     = PCSRC_ALUOUT;
      end
      S9_JUMP: begin
        ctrl.pc_write  = 1'b1;
        ctrl.pc_source = PCSRC_JUMP;
      end
      default: ;
    endcase
  end

  // the state register only ever holds one of the ten states, and the
  // memory is never read and written in the same step
  a_legal_state: assert property (@(posedge clk) disable iff (rst)
    state inside {[S0_FETCH:S9_JUMP]});
  a_mem_rw: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.mem_read && ctrl.mem_write));
  a_pc_write: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.pc_write && ctrl.pc_write_cond));
endmodule
