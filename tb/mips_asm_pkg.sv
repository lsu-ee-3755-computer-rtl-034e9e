// mips_asm_pkg: instruction encoders for the testbenches (R, I and J
// formats of the MIPS subset), so that test programs can be written as
// function calls instead of hexadecimal words.
package mips_asm_pkg;
  import mips_pkg::*;

  function automatic logic [31:0] enc_r(logic [5:0] fn, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction

  function automatic logic [31:0] sext16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  function automatic logic [31:0] slt32(logic [31:0] a, logic [31:0] b);
    if (a[31] != b[31]) return {31'd0, a[31]};
    return {31'd0, a < b};
  endfunction
endpackage
