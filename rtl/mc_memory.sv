// mc_memory: the single memory of the multi-cycle datapath, holding both
// instructions and data.
//
// DEPTH words of 32 bits, word-addressed by byte address bits [AW+1:2].
// Reads are asynchronous and return 0 unless mem_read is 1; a write of wdata
// happens on the rising clock edge when mem_write is 1. A second write port
// (load_we, load_addr, load_data) lets a host place a program and data
// before the processor leaves reset; it takes priority over mem_write. The
// size and the load port are this design's own choices.
// Address bits above the memory size are ignored, so addresses wrap.
module mc_memory #(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we)        mem[load_addr[AW+1:2]] <= load_data;
    else if (mem_write) mem[addr[AW+1:2]]      <= wdata;
  end

  assign rdata = mem_read ? mem[addr[AW+1:2]] : '0;
endmodule
