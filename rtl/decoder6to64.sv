// decoder6to64: 6-to-64 one-hot decoder.
//
// Output bit i is 1 exactly when the input equals i. Two of these decode the
// opcode field (outputs x0..x63) and the function field (outputs y0..y63) of
// an instruction; the single-cycle control equations are then sums of these
// products, e.g. ALU_OP[2] = x0*y34 + x4 + x5. Purely combinational.
module decoder6to64 (
  input  logic [5:0]  in,
  output logic [63:0] out
);
  always_comb begin
    out     = '0;
    out[in] = 1'b1;
  end
endmodule
