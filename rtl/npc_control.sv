// npc_control: the controller in front of the NPC multiplexer.
//
// Inputs are NPC_CNT_SIG from the control block (00 branch, 01 j/jal,
// 10 jr/jalr, 11 regular) and the output of the branch-condition mux (1 when
// the branch condition is met). Output Mux_NPC_CNT picks the next NPC value:
// 00 branch target, 01 jump address, 10 register rs, 11 NPC+4. A branch whose
// condition fails falls through to 11. The logic is the two minimised
// sum-of-products terms of the Karnaugh maps:
//   Mux_NPC_CNT[0] = SIG[0] + MUX' * SIG[1]'
//   Mux_NPC_CNT[1] = SIG[1] + MUX' * SIG[0]'
// Purely combinational.
module npc_control
  import mips_pkg::*;
(
  input  npc_sig_e npc_cnt_sig,
  input  logic     cond_met,
  output npc_sel_e mux_npc_cnt
);
  logic [1:0] sig;
  logic [1:0] sel;
  assign sig    = npc_cnt_sig;
  assign sel[0] = sig[0] | (~cond_met & ~sig[1]);
  assign sel[1] = sig[1] | (~cond_met & ~sig[0]);
  assign mux_npc_cnt = npc_sel_e'(sel);
endmodule
