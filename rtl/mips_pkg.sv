// mips_pkg: opcodes, function codes, ALU operation codes and the control
// bundles shared by the single-cycle and the multi-cycle MIPS subset.
//
// The opcode and function values, the 3-bit ALU_OP code and the 2-bit
// NPC select codes are the ones the design's control tables use. Note that
// ANDI is given opcode 6 here, as in those tables (standard MIPS uses 0x0c).
// The struct packing and the extra signals reg_write and mem_byte are this
// design's own choices: the control tables never name a register-file write
// enable or a byte/word size signal, but the datapath needs both.
package mips_pkg;

  // ---- primary opcodes, instruction bits [31:26] ----
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ANDI  = 6'h06;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_SLTI  = 6'h0a;
  localparam logic [5:0] OP_ORI   = 6'h0d;
  localparam logic [5:0] OP_LB    = 6'h20;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SB    = 6'h28;
  localparam logic [5:0] OP_SW    = 6'h2b;

  // ---- R-type function codes, instruction bits [5:0] ----
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_SLT  = 6'h2a;

  // ALU_OP[2:0]
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_SLT = 3'b010,
    ALU_ADD = 3'b011,
    ALU_SUB = 3'b100
  } alu_op_e;

  // NPC_CNT_SIG[1:0]: what kind of control transfer the instruction is
  typedef enum logic [1:0] {
    SIG_BRANCH  = 2'b00,   // beq, bne
    SIG_JUMP    = 2'b01,   // j, jal
    SIG_JREG    = 2'b10,   // jr, jalr
    SIG_REGULAR = 2'b11
  } npc_sig_e;

  // Mux_NPC_CNT[1:0]: which address is loaded into NPC
  typedef enum logic [1:0] {
    NPC_TARGET = 2'b00,    // branch target
    NPC_JUMP   = 2'b01,    // {NPC[31:28], IR[25:0], 00}
    NPC_DRS    = 2'b10,    // register rs
    NPC_PLUS4  = 2'b11     // NPC + 4
  } npc_sel_e;

  // Outputs of the single-cycle "Control Signal" block, numbered as in the
  // list of control points 1)..9); reg_write and mem_byte are additions.
  typedef struct packed {
    alu_op_e  alu_op;              // 1) ALU_OP[2:0]
    logic     mux_alu_cnt;         // 2) 1: sign-extended immediate to ALU
    logic     mux_datamem;         // 3) 1: data memory Dout, 0: ALU output
    logic     mux_rd_cnt;          // 4) 1: write register #31
    logic     mux_line11;          // 5) 1: IR[20:16] as destination, 0: IR[15:11]
    logic     mux_line_npc_plus4;  // 6) 1: write NPC+4 (PC+8) to the register file
    npc_sig_e npc_cnt_sig;         // 7) input of the NPC controller
    logic     mux_branch;          // 8) 1: branch on zero', 0: branch on zero
    logic     rw;                  // 9) data memory R/W, 1 = write
    logic     reg_write;           //    register file write enable (added)
    logic     mem_byte;            //    byte access for lb/sb (added)
  } sc_ctrl_t;

  localparam int SC_CTRL_W = $bits(sc_ctrl_t);

  // Multi-cycle FSM states, numbered as in the state diagram
  typedef enum logic [3:0] {
    S0_FETCH     = 4'd0,
    S1_DECODE    = 4'd1,
    S2_MEM_ADDR  = 4'd2,
    S3_MEM_READ  = 4'd3,
    S4_LOAD_WB   = 4'd4,
    S5_MEM_WRITE = 4'd5,
    S6_EXECUTE   = 4'd6,
    S7_R_WB      = 4'd7,
    S8_BRANCH    = 4'd8,
    S9_JUMP      = 4'd9
  } mc_state_e;

  // Multi-cycle ALU operand and PC sources
  typedef enum logic [1:0] {
    SRCB_B    = 2'd0,   // register B
    SRCB_FOUR = 2'd1,   // constant 4
    SRCB_IMM  = 2'd2,   // sign-extended IR[15:0]
    SRCB_BOFF = 2'd3    // sign-extended IR[15:0] << 2
  } mc_srcb_e;

  typedef enum logic [1:0] {
    PCSRC_ALU    = 2'd0,  // ALU result (PC + 4)
    PCSRC_ALUOUT = 2'd1,  // ALUOut register (branch target)
    PCSRC_JUMP   = 2'd2   // {PC[31:28], IR[25:0], 00}
  } mc_pcsrc_e;

  typedef enum logic [1:0] {
    ALUCTL_ADD   = 2'd0,  // address and PC arithmetic
    ALUCTL_SUB   = 2'd1,  // beq compare
    ALUCTL_FUNCT = 2'd2   // R-type: operation from IR[5:0]
  } mc_aluctl_e;

  // Moore outputs of the multi-cycle controller
  typedef struct packed {
    logic       pc_write;       // load PC unconditionally
    logic       pc_write_cond;  // load PC if the ALU zero flag is set
    logic       iord;           // memory address: 0 = PC, 1 = ALUOut
    logic       mem_read;
    logic       mem_write;
    logic       ir_write;
    logic       mem_to_reg;     // register write data: 0 = ALUOut, 1 = MDR
    logic       reg_dst;        // destination: 0 = IR[20:16], 1 = IR[15:11]
    logic       reg_write;
    logic       alu_src_a;      // ALU A operand: 0 = PC, 1 = register A
    mc_srcb_e   alu_src_b;
    mc_aluctl_e alu_ctl;
    mc_pcsrc_e  pc_source;
  } mc_ctrl_t;

  // ALU operation of an R-type function code; unknown codes give AND
  function automatic alu_op_e funct_to_alu(input logic [5:0] fn);
    case (fn)
      FN_AND:  return ALU_AND;
      FN_OR:   return ALU_OR;
      FN_SLT:  return ALU_SLT;
      FN_ADD:  return ALU_ADD;
      FN_SUB:  return ALU_SUB;
      default: return ALU_AND;
    endcase
  endfunction

endpackage
