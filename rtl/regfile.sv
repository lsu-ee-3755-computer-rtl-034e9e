// regfile: MIPS general-purpose register file, 32 registers of 32 bits.
//
// Two asynchronous read ports (rs -> drs, rt -> drt) and one write port
// (A Write / D/IN) written on the rising clock edge when we is 1. Register 0
// always reads as zero and ignores writes, as in MIPS. The write enable and
// the reset that clears every register are this design's own additions; the
// datapath drawing shows only the address and data ports.
module regfile #(
  parameter int W     = 32,
  parameter int NREGS = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
