// asm_pkg: encoders for the MIPS-I instructions the testbenches use.
// Each function returns the 32-bit instruction word.
package asm_pkg;
  function automatic logic [31:0] r_t(input logic [5:0] fn, input int rd, input int rs, input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] i_t(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addu (input int rd, input int rs, input int rt); return r_t(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] subu (input int rd, input int rs, input int rt); return r_t(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] and_ (input int rd, input int rs, input int rt); return r_t(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] or_  (input int rd, input int rs, input int rt); return r_t(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] xor_ (input int rd, input int rs, input int rt); return r_t(6'h26, rd, rs, rt); endfunction
  function automatic logic [31:0] nor_ (input int rd, input int rs, input int rt); return r_t(6'h27, rd, rs, rt); endfunction
  function automatic logic [31:0] slt  (input int rd, input int rs, input int rt); return r_t(6'h2A, rd, rs, rt); endfunction
  function automatic logic [31:0] sltu (input int rd, input int rs, input int rt); return r_t(6'h2B, rd, rs, rt); endfunction
  function automatic logic [31:0] sll  (input int rd, input int rt, input int sh); return r_t(6'h00, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] srl  (input int rd, input int rt, input int sh); return r_t(6'h02, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] sra  (input int rd, input int rt, input int sh); return r_t(6'h03, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] sllv (input int rd, input int rt, input int rs); return r_t(6'h04, rd, rs, rt); endfunction
  function automatic logic [31:0] jr   (input int rs); return r_t(6'h08, 0, rs, 0); endfunction
  function automatic logic [31:0] jalr (input int rd, input int rs); return r_t(6'h09, rd, rs, 0); endfunction
  function automatic logic [31:0] brk  (); return r_t(6'h0D, 0, 0, 0); endfunction
  function automatic logic [31:0] nop  (); return 32'h0; endfunction
  function automatic logic [31:0] addiu(input int rt, input int rs, input int imm); return i_t(6'h09, rt, rs, imm); endfunction
  function automatic logic [31:0] slti (input int rt, input int rs, input int imm); return i_t(6'h0A, rt, rs, imm); endfunction
  function automatic logic [31:0] andi (input int rt, input int rs, input int imm); return i_t(6'h0C, rt, rs, imm); endfunction
  function automatic logic [31:0] ori  (input int rt, input int rs, input int imm); return i_t(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] lui  (input int rt, input int imm); return i_t(6'h0F, rt, 0, imm); endfunction
  function automatic logic [31:0] lw   (input int rt, input int imm, input int rs); return i_t(6'h23, rt, rs, imm); endfunction
  function automatic logic [31:0] sw   (input int rt, input int imm, input int rs); return i_t(6'h2B, rt, rs, imm); endfunction
  // branch offsets are in words, relative to the delay slot
  function automatic logic [31:0] beq  (input int rs, input int rt, input int off); return i_t(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] bne  (input int rs, input int rt, input int off); return i_t(6'h05, rt, rs, off); endfunction
  function automatic logic [31:0] blez (input int rs, input int off); return i_t(6'h06, 0, rs, off); endfunction
  function automatic logic [31:0] bgtz (input int rs, input int off); return i_t(6'h07, 0, rs, off); endfunction
  function automatic logic [31:0] bltz (input int rs, input int off); return i_t(6'h01, 0, rs, off); endfunction
  function automatic logic [31:0] bgez (input int rs, input int off); return i_t(6'h01, 1, rs, off); endfunction
  function automatic logic [31:0] j    (input int widx); return {6'h02, 26'(widx)}; endfunction
  function automatic logic [31:0] jal  (input int widx); return {6'h03, 26'(widx)}; endfunction
  function automatic logic [31:0] add_s(input int fd, input int fs, input int ft); return {6'h11, 5'd16, 5'(ft), 5'(fs), 5'(fd), 6'h00}; endfunction
endpackage
