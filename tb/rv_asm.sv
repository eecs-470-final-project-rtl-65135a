// rv_asm: RV32IM instruction encoders used by the testbenches to build programs.
package rv_asm;
  function automatic logic [31:0] r_type(int f7, int rs2, int rs1, int f3, int rd, int op);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] i_type(int imm, int rs1, int f3, int rd, int op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] addi(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'h13); endfunction
  function automatic logic [31:0] slli(int rd, int rs1, int sh); return i_type(sh, rs1, 1, rd, 7'h13); endfunction
  function automatic logic [31:0] add (int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic logic [31:0] sub (int rd, int rs1, int rs2); return r_type(32, rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic logic [31:0] xor_(int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 4, rd, 7'h33); endfunction
  function automatic logic [31:0] mul (int rd, int rs1, int rs2); return r_type(1, rs2, rs1, 0, rd, 7'h33); endfunction
  function automatic logic [31:0] mulh(int rd, int rs1, int rs2); return r_type(1, rs2, rs1, 1, rd, 7'h33); endfunction
  function automatic logic [31:0] lui (int rd, int imm20); return {20'(imm20), 5'(rd), 7'h37}; endfunction
  function automatic logic [31:0] lw  (int rd, int rs1, int imm); return i_type(imm, rs1, 2, rd, 7'h03); endfunction
  function automatic logic [31:0] lb  (int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'h03); endfunction
  function automatic logic [31:0] lbu (int rd, int rs1, int imm); return i_type(imm, rs1, 4, rd, 7'h03); endfunction
  function automatic logic [31:0] sw  (int rs2, int rs1, int imm);
    return {7'(imm >> 5), 5'(rs2), 5'(rs1), 3'd2, 5'(imm), 7'h23};
  endfunction
  function automatic logic [31:0] sb  (int rs2, int rs1, int imm);
    return {7'(imm >> 5), 5'(rs2), 5'(rs1), 3'd0, 5'(imm), 7'h23};
  endfunction
  function automatic logic [31:0] branch(int f3, int rs1, int rs2, int off);
    logic [12:0] o;
    o = 13'(off);
    return {o[12], o[10:5], 5'(rs2), 5'(rs1), 3'(f3), o[4:1], o[11], 7'h63};
  endfunction
  function automatic logic [31:0] beq (int rs1, int rs2, int off); return branch(0, rs1, rs2, off); endfunction
  function automatic logic [31:0] bne (int rs1, int rs2, int off); return branch(1, rs1, rs2, off); endfunction
  function automatic logic [31:0] blt (int rs1, int rs2, int off); return branch(4, rs1, rs2, off); endfunction
  function automatic logic [31:0] jal (int rd, int off);
    logic [20:0] o;
    o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], 5'(rd), 7'h6f};
  endfunction
  function automatic logic [31:0] jalr(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'h67); endfunction
  function automatic logic [31:0] lr_w(int rd, int rs1); return {5'b00010, 2'b00, 5'd0, 5'(rs1), 3'd2, 5'(rd), 7'h2f}; endfunction
  function automatic logic [31:0] sc_w(int rd, int rs2, int rs1); return {5'b00011, 2'b00, 5'(rs2), 5'(rs1), 3'd2, 5'(rd), 7'h2f}; endfunction
  function automatic logic [31:0] csrr_mhartid(int rd); return {12'hF14, 5'd0, 3'd2, 5'(rd), 7'h73}; endfunction
  function automatic logic [31:0] wfi(); return 32'h1050_0073; endfunction
endpackage
