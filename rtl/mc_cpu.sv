// mc_cpu: multi-cycle MIPS subset processor (lw, sw, add, sub, and, or,
// slt, beq, j).
//
// Compared with the single-cycle datapath it saves hardware: one memory
// serves instruction fetch and data access, and one ALU does the PC
// increment, the branch-target addition and the instruction's own
// arithmetic. Each instruction is broken into 3 to 5 steps of similar length,
// one per clock cycle, and the values passed from step to step are held in
// the registers IR, A, B, ALUOut and MDR. IR and PC are written only when the
// controller asks; A, B, ALUOut and MDR are written every cycle.
//   memory address = iord ? ALUOut : PC
//   ALU A = alu_src_a ? A : PC;  ALU B = B | 4 | sext(imm) | sext(imm) << 2
//   PC <= ALU result (PC+4) | ALUOut (branch target) | jump address,
//         when pc_write, or when pc_write_cond and the ALU zero flag is set
//   register write: rd = ALUOut (R-type) or rt = MDR (lw)
// There is no delay slot: a taken branch goes to PC + 4 + (offset << 2),
// the offset counted from the instruction after the branch. The sequencing
// comes from mc_control. Reset (synchronous, active high) clears PC, IR and
// the registers; memory size and reset values are this design's choices.
module mc_cpu
  import mips_pkg::*;
#(
  parameter int MEM_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output mc_state_e   state
);
  mc_ctrl_t    ctrl;
  logic [31:0] a_reg, b_reg, alu_out, mdr;
  logic [31:0] mem_addr, mem_rdata;
  logic [31:0] drs, drt, imm_ext, alu_a, alu_b, alu_y, pc_next, wb_data;
  logic [4:0]  wr_reg;
  logic        zero;
  alu_op_e     alu_op;

  mc_control u_ctrl (.clk, .rst, .op(ir[31:26]), .state, .ctrl);

  assign mem_addr = ctrl.iord ? alu_out : pc;

  mc_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk, .addr(mem_addr), .mem_read(ctrl.mem_read),
    .mem_write(ctrl.mem_write), .wdata(b_reg), .rdata(mem_rdata),
    .load_we, .load_addr, .load_data
  );

  assign wr_reg  = ctrl.reg_dst ? ir[15:11] : ir[20:16];
  assign wb_data = ctrl.mem_to_reg ? mdr : alu_out;

  regfile u_rf (
    .clk, .rst,
    .ra1(ir[25:21]), .ra2(ir[20:16]), .rd1(drs), .rd2(drt),
    .we(ctrl.reg_write), .wa(wr_reg), .wd(wb_data)
  );

  assign imm_ext = {{16{ir[15]}}, ir[15:0]};                    // sign extension

  assign alu_a = ctrl.alu_src_a ? a_reg : pc;
  always_comb begin
    unique case (ctrl.alu_src_b)
      SRCB_B:    alu_b = b_reg;
      SRCB_FOUR: alu_b = 32'd4;
      SRCB_IMM:  alu_b = imm_ext;
      default:   alu_b = {imm_ext[29:0], 2'b00};
    endcase
    unique case (ctrl.alu_ctl)
      ALUCTL_SUB:   alu_op = ALU_SUB;
      ALUCTL_FUNCT: alu_op = funct_to_alu(ir[5:0]);
      default:      alu_op = ALU_ADD;
    endcase
    unique case (ctrl.pc_source)
      PCSRC_ALUOUT: pc_next = alu_out;
      PCSRC_JUMP:   pc_next = {pc[31:28], ir[25:0], 2'b00};
      default:      pc_next = alu_y;
    endcase
  end

  alu u_alu (.a(alu_a), .b(alu_b), .op(alu_op), .y(alu_y), .zero);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      ir      <= '0;
      a_reg   <= '0;
      b_reg   <= '0;
      alu_out <= '0;
      mdr     <= '0;
    end else begin
      if (ctrl.pc_write || (ctrl.pc_write_cond && zero)) pc <= pc_next;
      if (ctrl.ir_write) ir <= mem_rdata;
      a_reg   <= drs;
      b_reg   <= drt;
      alu_out <= alu_y;
      mdr     <= mem_rdata;
    end
  end
endmodule
