// imem: instruction memory of the single-cycle datapath.
//
// DEPTH words of 32 bits, read asynchronously at the byte address addr
// (bits [1:0] ignored, the address wraps at the memory size). The datapath
// never writes it; a separate load port (load_we, load_addr, load_data,
// written on the rising clock edge) lets a host place a program before the
// processor leaves reset. The size and the load port are this design's
// choices: the datapath drawing shows only the read side.
module imem #(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        load_we,
  input  logic [31:0] load_addr,   // byte address
  input  logic [31:0] load_data
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
