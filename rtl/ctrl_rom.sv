// ctrl_rom: the single-cycle control block built as a ROM.
//
// The 12-bit ROM address is {OP[5:0], FUN[5:0]} and each of the 4096 words
// holds the full set of control outputs (sc_ctrl_t, the same signals
// sc_control produces). The contents are not stored as a listing: they are
// computed at elaboration by rom_word(), which writes out the per-instruction
// control tables (ALU_OP, mux selects, NPC_CNT_SIG, R/W) entry by entry. For
// loads and stores the ALU_OP word is ADD (011), the value of the main
// ALU_OP table. Reads are asynchronous (combinational), as a single-cycle
// datapath needs. reg_write and mem_byte are this design's additions.
module ctrl_rom
  import mips_pkg::*;
(
  input  logic [11:0] addr,   // {opcode, function}
  output sc_ctrl_t    data
);
  typedef logic [SC_CTRL_W-1:0] rom_t [4096];

  function automatic sc_ctrl_t rom_word(input logic [11:0] a);
    logic [5:0] op, fn;
    sc_ctrl_t w;
    op = a[11:6];
    fn = a[5:0];
    w  = '{alu_op: ALU_AND, npc_cnt_sig: SIG_REGULAR, default: 1'b0};
    case (op)
      OP_RTYPE: begin
        case (fn)
          FN_AND:  begin w.alu_op = ALU_AND; w.reg_write = 1'b1; end
          FN_OR:   begin w.alu_op = ALU_OR;  w.reg_write = 1'b1; end
          FN_SLT:  begin w.alu_op = ALU_SLT; w.reg_write = 1'b1; end
          FN_ADD:  begin w.alu_op = ALU_ADD; w.reg_write = 1'b1; end
          FN_SUB:  begin w.alu_op = ALU_SUB; w.reg_write = 1'b1; end
          FN_JR:   w.npc_cnt_sig = SIG_JREG;
          FN_JALR: begin
            w.npc_cnt_sig        = SIG_JREG;
            w.mux_line_npc_plus4 = 1'b1;
            w.reg_write          = 1'b1;
          end
          default: ;
        endcase
      end
      OP_ANDI, OP_ORI, OP_SLTI, OP_ADDI: begin
        w.alu_op      = (op == OP_ANDI) ? ALU_AND :
                        (op == OP_ORI)  ? ALU_OR  :
                        (op == OP_SLTI) ? ALU_SLT : ALU_ADD;
        w.mux_alu_cnt = 1'b1;
        w.mux_line11  = 1'b1;
        w.reg_write   = 1'b1;
      end
      OP_LW, OP_LB: begin
        w.alu_op      = ALU_ADD;
        w.mux_alu_cnt = 1'b1;
        w.mux_datamem = 1'b1;
        w.mux_line11  = 1'b1;
        w.reg_write   = 1'b1;
        w.mem_byte    = (op == OP_LB);
      end
      OP_SW, OP_SB: begin
        w.alu_op      = ALU_ADD;
        w.mux_alu_cnt = 1'b1;
        w.rw          = 1'b1;
        w.mem_byte    = (op == OP_SB);
      end
      OP_BEQ, OP_BNE: begin
        w.alu_op      = ALU_SUB;
        w.npc_cnt_sig = SIG_BRANCH;
        w.mux_branch  = (op == OP_BNE);
      end
      OP_J:   w.npc_cnt_sig = SIG_JUMP;
      OP_JAL: begin
        w.npc_cnt_sig        = SIG_JUMP;
        w.mux_rd_cnt         = 1'b1;
        w.mux_line_npc_plus4 = 1'b1;
        w.reg_write          = 1'b1;
      end
      default: ;
    endcase
    return w;
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < 4096; i++) r[i] = SC_CTRL_W'(rom_word(12'(i)));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = sc_ctrl_t'(ROM[addr]);
endmodule
