// mips_lecture_top: the two MIPS subset processors side by side.
//
// sc_cpu is the single-cycle machine (one instruction per clock, separate
// instruction and data memories, two address registers PC/NPC with a delay
// slot); mc_cpu is the multi-cycle machine (one memory, one ALU, a ten-state
// controller, 3 to 5 clocks per instruction). They share nothing but the
// clock and reset and each has its own program-load port and observation
// outputs, prefixed sc_ and mc_. Sizes are passed through as parameters.
module mips_lecture_top
  import mips_pkg::*;
#(
  parameter int SC_IMEM_DEPTH = 1024,
  parameter int SC_DMEM_DEPTH = 1024,
  parameter int MC_MEM_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // single-cycle processor
  input  logic        sc_load_we,
  input  logic [31:0] sc_load_addr,
  input  logic [31:0] sc_load_data,
  output logic [31:0] sc_pc,
  output logic [31:0] sc_npc,
  output logic [31:0] sc_instr,
  // multi-cycle processor
  input  logic        mc_load_we,
  input  logic [31:0] mc_load_addr,
  input  logic [31:0] mc_load_data,
  output logic [31:0] mc_pc,
  output logic [31:0] mc_ir,
  output mc_state_e   mc_state
);
  sc_cpu #(.IMEM_DEPTH(SC_IMEM_DEPTH), .DMEM_DEPTH(SC_DMEM_DEPTH)) u_sc (
    .clk, .rst,
    .load_we(sc_load_we), .load_addr(sc_load_addr), .load_data(sc_load_data),
    .pc(sc_pc), .npc(sc_npc), .instr(sc_instr)
  );

  mc_cpu #(.MEM_DEPTH(MC_MEM_DEPTH)) u_mc (
    .clk, .rst,
    .load_we(mc_load_we), .load_addr(mc_load_addr), .load_data(mc_load_data),
    .pc(mc_pc), .ir(mc_ir), .state(mc_state)
  );
endmodule
