// Instruction encoders used by the testbenches: build add, and, lw and sw
// words from their register numbers and immediate (standard MIPS formats).
package mips_asm_pkg;
  function automatic logic [31:0] asm_add(int rd, int rs, int rt);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h20};
  endfunction
  function automatic logic [31:0] asm_and(int rd, int rs, int rt);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h24};
  endfunction
  function automatic logic [31:0] asm_lw(int rt, int imm, int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] asm_sw(int rt, int imm, int rs);
    return {6'h2b, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
endpackage
