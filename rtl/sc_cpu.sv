// sc_cpu: single-cycle MIPS subset processor.
//
// Every instruction completes in one clock cycle. Two address registers sit
// in front of the instruction memory: PC holds the address of the
// instruction being executed and NPC the address of the next one. On each
// rising edge PC <= NPC and NPC <= one of four values picked by Mux_NPC_CNT:
// the branch target NPC + (sign-extended offset << 2), the jump address
// {NPC[31:28], IR[25:0], 00}, register rs (jr/jalr) or NPC + 4. The
// instruction after a branch or jump is therefore always executed (a delay
// slot), and jal/jalr save NPC + 4 = PC + 8 as the return address.
//
// Datapath multiplexers, numbered as the control points:
//   2) ALU operand B: Drt or sign-extended immediate     (Mux_ALU_CNT)
//   3) ALU result or data-memory Dout                    (Mux_DataMem)
//   4) destination register or #31                       (Mux_Rd_CNT)
//   5) destination IR[15:11] or IR[20:16]                (Mux_Line11)
//   6) register write data: mux 3 or NPC + 4             (Mux_Line_NPC_plus4)
//   7) next NPC                                          (Mux_NPC_CNT)
//   8) branch condition: zero (beq) or zero' (bne)       (Mux_Branch)
// Instructions: and or slt add sub andi ori slti addi lw lb sw sb beq bne
// j jal jr jalr. There is no overflow trap. Every 16-bit immediate, that of
// andi and ori included, is sign-extended: the datapath has no zero-extension
// path.
//
// The control block is sc_control (decoders and OR gates) or, with
// USE_ROM_CONTROL = 1, the ROM form ctrl_rom; both produce the same signals.
// Reset (synchronous, active high) sets PC = 0, NPC = 4 and clears the
// registers; these reset values, the memory sizes, the register write enable
// and the byte-access signal are this design's own choices. The program is
// written into the instruction memory through the load port, normally while
// rst is held.
module sc_cpu
  import mips_pkg::*;
#(
  parameter int  IMEM_DEPTH      = 1024,
  parameter int  DMEM_DEPTH      = 1024,
  parameter bit  USE_ROM_CONTROL = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  // instruction-memory load port
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  // observation
  output logic [31:0] pc,
  output logic [31:0] npc,
  output logic [31:0] instr
);
  sc_ctrl_t    ctrl;
  npc_sel_e    mux_npc_cnt;
  logic [31:0] drs, drt, imm_ext, alu_b, alu_y, dout;
  logic [31:0] npc_plus4, branch_target, jump_target, npc_next;
  logic [31:0] wb_mem, wb_data;
  logic [4:0]  dest_line, dest;
  logic        zero, cond_met;

  // ---- fetch ----
  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .addr(pc), .rdata(instr),
    .load_we, .load_addr, .load_data
  );

  // ---- control ----
  if (USE_ROM_CONTROL) begin : g_rom_ctrl
    ctrl_rom u_ctrl (.addr({instr[31:26], instr[5:0]}), .data(ctrl));
  end else begin : g_dec_ctrl
    sc_control u_ctrl (.op(instr[31:26]), .fn(instr[5:0]), .ctrl(ctrl));
  end

  // ---- register file ----
  assign dest_line = ctrl.mux_line11 ? instr[20:16] : instr[15:11];  // mux 5
  assign dest      = ctrl.mux_rd_cnt ? 5'd31 : dest_line;            // mux 4

  regfile u_rf (
    .clk, .rst,
    .ra1(instr[25:21]), .ra2(instr[20:16]),
    .rd1(drs), .rd2(drt),
    .we(ctrl.reg_write), .wa(dest), .wd(wb_data)
  );

  // ---- execute ----
  assign imm_ext = {{16{instr[15]}}, instr[15:0]};                    // sign extension

  assign alu_b = ctrl.mux_alu_cnt ? imm_ext : drt;                    // mux 2

  alu u_alu (.a(drs), .b(alu_b), .op(ctrl.alu_op), .y(alu_y), .zero);

  assign cond_met = ctrl.mux_branch ? ~zero : zero;                   // mux 8

  // ---- memory ----
  dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(alu_y), .din(drt), .rw(ctrl.rw),
    .byte_en(ctrl.mem_byte), .dout
  );

  // ---- write back ----
  assign npc_plus4 = npc + 32'd4;
  assign wb_mem    = ctrl.mux_datamem ? dout : alu_y;                 // mux 3
  assign wb_data   = ctrl.mux_line_npc_plus4 ? npc_plus4 : wb_mem;    // mux 6

  // ---- next address ----
  npc_control u_npc_ctl (
    .npc_cnt_sig(ctrl.npc_cnt_sig), .cond_met, .mux_npc_cnt
  );

  assign branch_target = npc + {imm_ext[29:0], 2'b00};
  assign jump_target   = {npc[31:28], instr[25:0], 2'b00};

  always_comb begin                                                   // mux 7
    unique case (mux_npc_cnt)
      NPC_TARGET: npc_next = branch_target;
      NPC_JUMP:   npc_next = jump_target;
      NPC_DRS:    npc_next = drs;
      default:    npc_next = npc_plus4;
    endcase
  end

  // a store never writes a register, a load always does, and a jump-and-link
  // always saves the return address
  a_store_no_wb: assert property (@(posedge clk) disable iff (rst)
    ctrl.rw |-> !ctrl.reg_write);
  a_load_wb: assert property (@(posedge clk) disable iff (rst)
    ctrl.mux_datamem |-> ctrl.reg_write && !ctrl.rw);
  a_link_wb: assert property (@(posedge clk) disable iff (rst)
    ctrl.mux_line_npc_plus4 |-> ctrl.reg_write);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= 32'd0;
      npc <= 32'd4;
    end else begin
      pc  <= npc;
      npc <= npc_next;
    end
  end
endmodule
