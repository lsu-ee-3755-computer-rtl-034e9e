// sc_control: the "Control Signal" block of the single-cycle datapath,
// built the decoder way.
//
// The opcode field IR[31:26] goes into one 6-to-64 decoder (outputs x0..x63)
// and the function field IR[5:0] into another (y0..y63). Each control output
// is then an OR of decoder lines, with R-type lines qualified by x0, e.g.
//   ALU_OP[2] = x0*y34 + x4 + x5            (sub, beq, bne)
//   Mux_Branch = x5                          (bne)
//   R/W        = x43 + x40                   (sw, sb)
// The ALU_OP[2:0], mux-select, NPC_CNT_SIG and R/W terms follow the design's
// control tables. reg_write (register-file write enable) and mem_byte
// (byte access for lb/sb) are not in those tables and are this design's own
// additions, built from the same decoder lines. Instructions outside the
// subset decode as "regular" with no register or memory write. Most of the
// 128 decoder lines are left unconnected: only the subset's codes matter.
// Purely combinational.
module sc_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] fn,
  output sc_ctrl_t   ctrl
);
  logic [63:0] x, y;

  decoder6to64 u_op_dec (.in(op), .out(x));
  decoder6to64 u_fn_dec (.in(fn), .out(y));

  // R-type lines
  logic r_and, r_or, r_slt, r_add, r_sub, r_jr, r_jalr;
  assign r_and  = x[0] & y[36];
  assign r_or   = x[0] & y[37];
  assign r_slt  = x[0] & y[42];
  assign r_add  = x[0] & y[32];
  assign r_sub  = x[0] & y[34];
  assign r_jr   = x[0] & y[8];
  assign r_jalr = x[0] & y[9];

  // memory reference opcodes lw(35) lb(32) sw(43) sb(40)
  logic mem_ref;
  assign mem_ref = x[35] | x[32] | x[43] | x[40];

  logic [2:0] alu_op_bits;
  assign alu_op_bits[2] = r_sub | x[4] | x[5];
  assign alu_op_bits[1] = r_slt | x[10] | r_add | x[8] | mem_ref;
  assign alu_op_bits[0] = r_or  | x[13] | r_add | x[8] | mem_ref;

  logic [1:0] sig;
  assign sig[1] = ~(x[4] | x[5] | x[2] | x[3]);   // 0 for branch, j, jal
  assign sig[0] = ~(x[4] | x[5] | r_jr | r_jalr); // 0 for branch, jr, jalr

  always_comb begin
    ctrl.alu_op             = alu_op_e'(alu_op_bits);
    ctrl.mux_alu_cnt        = x[6] | x[13] | x[10] | x[8] | mem_ref;
    ctrl.mux_datamem        = x[35] | x[32];
    ctrl.mux_rd_cnt         = x[3];
    ctrl.mux_line11         = x[6] | x[13] | x[10] | x[8] | x[35] | x[32];
    ctrl.mux_line_npc_plus4 = x[3] | r_jalr;
    ctrl.npc_cnt_sig        = npc_sig_e'(sig);
    ctrl.mux_branch         = x[5];
    ctrl.rw                 = x[43] | x[40];
    ctrl.reg_write          = r_and | r_or | r_slt | r_add | r_sub | r_jalr
                            | x[6] | x[13] | x[10] | x[8] | x[35] | x[32] | x[3];
    ctrl.mem_byte           = x[32] | x[40];
  end
endmodule
