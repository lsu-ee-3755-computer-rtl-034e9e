// dmem: data memory of the single-cycle datapath (Addr, D/IN, Dout, R/W).
//
// DEPTH words of 32 bits. Reads are asynchronous; with R/W = 1 the word (or,
// with byte = 1, the addressed byte) is written on the rising clock edge.
// For a byte read, Dout is the addressed byte sign-extended, as lb needs; for
// a word read the address bits [1:0] are ignored. Byte lanes are
// little-endian (byte 0 in bits 7:0). R/W = 0 means read, 1 write, as in the
// control tables; the byte/word input, the endianness and the size are this
// design's choices. No reset: contents start undefined.
// Address bits above the memory size are ignored, so addresses wrap.
module dmem #(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  input  logic        rw,      // 1 = write
  input  logic        byte_en, // 1 = byte access
  output logic [31:0] dout
);
  logic [31:0] mem [DEPTH];
  logic [AW-1:0] widx;
  logic [1:0]    lane;
  logic [31:0]   word;
  logic [7:0]    rbyte;

  assign widx  = addr[AW+1:2];
  assign lane  = addr[1:0];
  assign word  = mem[widx];
  assign rbyte = word[8*lane +: 8];
  assign dout  = byte_en ? {{24{rbyte[7]}}, rbyte} : word;

  always_ff @(posedge clk) begin
    if (rw) begin
      if (byte_en) mem[widx][8*lane +: 8] <= din[7:0];
      else         mem[widx]              <= din;
    end
  end
endmodule
