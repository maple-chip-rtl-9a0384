// maple_asm_pkg: a small assembler for MAPLE test programs.
//
// Functions that return the 32-bit encoding of one instruction. The field
// layout is that of DLX (I-type op|rs1|rd|imm16, R-type 0|rs1|rs2|rd|func,
// FP R-type 1|fs1|fs2|fd|func, J-type op|offset26) plus the two receive-
// register instructions SENDRR (op 0x3C: rs1 = data, rd field = RR index,
// imm = destination PE) and MOVRR2I (SPECIAL func 0x38: rd <- RR[rs1]).
// The numbers are written out here rather than taken from the RTL package,
// so that a wrong constant in the RTL shows up as a failing test.
package maple_asm_pkg;

  function automatic logic [31:0] itype(input int op, input int rd, input int rs1, input int imm);
    return {6'(op), 5'(rs1), 5'(rd), 16'(imm)};
  endfunction
  function automatic logic [31:0] rtype(input int fn, input int rd, input int rs1, input int rs2);
    return {6'h00, 5'(rs1), 5'(rs2), 5'(rd), 5'h0, 6'(fn)};
  endfunction
  function automatic logic [31:0] ftype(input int fn, input int fd, input int fs1, input int fs2);
    return {6'h01, 5'(fs1), 5'(fs2), 5'(fd), 5'h0, 6'(fn)};
  endfunction

  // integer
  function automatic logic [31:0] ADDI (int rd, int rs1, int imm); return itype(8'h08, rd, rs1, imm); endfunction
  function automatic logic [31:0] ADDUI(int rd, int rs1, int imm); return itype(8'h09, rd, rs1, imm); endfunction
  function automatic logic [31:0] SUBI (int rd, int rs1, int imm); return itype(8'h0A, rd, rs1, imm); endfunction
  function automatic logic [31:0] ANDI (int rd, int rs1, int imm); return itype(8'h0C, rd, rs1, imm); endfunction
  function automatic logic [31:0] ORI  (int rd, int rs1, int imm); return itype(8'h0D, rd, rs1, imm); endfunction
  function automatic logic [31:0] XORI (int rd, int rs1, int imm); return itype(8'h0E, rd, rs1, imm); endfunction
  function automatic logic [31:0] LHI  (int rd, int imm);          return itype(8'h0F, rd, 0, imm);   endfunction
  function automatic logic [31:0] SLLI (int rd, int rs1, int imm); return itype(8'h14, rd, rs1, imm); endfunction
  function automatic logic [31:0] SRLI (int rd, int rs1, int imm); return itype(8'h16, rd, rs1, imm); endfunction
  function automatic logic [31:0] SRAI (int rd, int rs1, int imm); return itype(8'h17, rd, rs1, imm); endfunction
  function automatic logic [31:0] SLTI (int rd, int rs1, int imm); return itype(8'h1A, rd, rs1, imm); endfunction
  function automatic logic [31:0] SEQI (int rd, int rs1, int imm); return itype(8'h18, rd, rs1, imm); endfunction
  function automatic logic [31:0] ADD  (int rd, int rs1, int rs2); return rtype(8'h20, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SUB  (int rd, int rs1, int rs2); return rtype(8'h22, rd, rs1, rs2); endfunction
  function automatic logic [31:0] AND_ (int rd, int rs1, int rs2); return rtype(8'h24, rd, rs1, rs2); endfunction
  function automatic logic [31:0] OR_  (int rd, int rs1, int rs2); return rtype(8'h25, rd, rs1, rs2); endfunction
  function automatic logic [31:0] XOR_ (int rd, int rs1, int rs2); return rtype(8'h26, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SLL  (int rd, int rs1, int rs2); return rtype(8'h04, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SRA  (int rd, int rs1, int rs2); return rtype(8'h07, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SLT  (int rd, int rs1, int rs2); return rtype(8'h2A, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SGE  (int rd, int rs1, int rs2); return rtype(8'h2D, rd, rs1, rs2); endfunction
  function automatic logic [31:0] NOP  ();                         return itype(8'h08, 0, 0, 0);      endfunction

  // memory
  function automatic logic [31:0] LB (int rd, int rs1, int imm); return itype(8'h20, rd, rs1, imm); endfunction
  function automatic logic [31:0] LH (int rd, int rs1, int imm); return itype(8'h21, rd, rs1, imm); endfunction
  function automatic logic [31:0] LW (int rd, int rs1, int imm); return itype(8'h23, rd, rs1, imm); endfunction
  function automatic logic [31:0] LBU(int rd, int rs1, int imm); return itype(8'h24, rd, rs1, imm); endfunction
  function automatic logic [31:0] LHU(int rd, int rs1, int imm); return itype(8'h25, rd, rs1, imm); endfunction
  function automatic logic [31:0] LF (int fd, int rs1, int imm); return itype(8'h26, fd, rs1, imm); endfunction
  function automatic logic [31:0] SB (int rs, int rs1, int imm); return itype(8'h28, rs, rs1, imm); endfunction
  function automatic logic [31:0] SH (int rs, int rs1, int imm); return itype(8'h29, rs, rs1, imm); endfunction
  function automatic logic [31:0] SW (int rs, int rs1, int imm); return itype(8'h2B, rs, rs1, imm); endfunction
  function automatic logic [31:0] SF (int fs, int rs1, int imm); return itype(8'h2E, fs, rs1, imm); endfunction
  function automatic logic [31:0] LD (int fd, int rs1, int imm); return itype(8'h27, fd, rs1, imm); endfunction
  function automatic logic [31:0] SD (int fs, int rs1, int imm); return itype(8'h2F, fs, rs1, imm); endfunction

  // control (offsets are in bytes, relative to the address after the branch)
  function automatic logic [31:0] BEQZ(int rs1, int off); return itype(8'h04, 0, rs1, off); endfunction
  function automatic logic [31:0] BNEZ(int rs1, int off); return itype(8'h05, 0, rs1, off); endfunction
  function automatic logic [31:0] BFPT(int off);          return itype(8'h06, 0, 0, off);   endfunction
  function automatic logic [31:0] BFPF(int off);          return itype(8'h07, 0, 0, off);   endfunction
  function automatic logic [31:0] J   (int off);          return {6'h02, 26'(off)};         endfunction
  function automatic logic [31:0] JAL (int off);          return {6'h03, 26'(off)};         endfunction
  function automatic logic [31:0] JR  (int rs1);          return itype(8'h12, 0, rs1, 0);   endfunction
  function automatic logic [31:0] JALR(int rs1);          return itype(8'h13, 0, rs1, 0);   endfunction
  function automatic logic [31:0] TRAP();                 return itype(8'h11, 0, 0, 0);     endfunction

  // floating point
  function automatic logic [31:0] ADDF (int fd, int a, int b); return ftype(8'h00, fd, a, b); endfunction
  function automatic logic [31:0] SUBF (int fd, int a, int b); return ftype(8'h01, fd, a, b); endfunction
  function automatic logic [31:0] MULTF(int fd, int a, int b); return ftype(8'h02, fd, a, b); endfunction
  function automatic logic [31:0] DIVF (int fd, int a, int b); return ftype(8'h03, fd, a, b); endfunction
  function automatic logic [31:0] ADDD (int fd, int a, int b); return ftype(8'h04, fd, a, b); endfunction
  function automatic logic [31:0] SUBD (int fd, int a, int b); return ftype(8'h05, fd, a, b); endfunction
  function automatic logic [31:0] MULTD(int fd, int a, int b); return ftype(8'h06, fd, a, b); endfunction
  function automatic logic [31:0] DIVD (int fd, int a, int b); return ftype(8'h07, fd, a, b); endfunction
  function automatic logic [31:0] CVTF2D(int fd, int a);       return ftype(8'h08, fd, a, 0); endfunction
  function automatic logic [31:0] CVTD2I(int fd, int a);       return ftype(8'h0B, fd, a, 0); endfunction
  function automatic logic [31:0] CVTI2F(int fd, int a);       return ftype(8'h0C, fd, a, 0); endfunction
  function automatic logic [31:0] CVTI2D(int fd, int a);       return ftype(8'h0D, fd, a, 0); endfunction
  function automatic logic [31:0] MULT (int fd, int a, int b); return ftype(8'h0E, fd, a, b); endfunction
  function automatic logic [31:0] LTF  (int a, int b);         return ftype(8'h12, 0, a, b);  endfunction
  function automatic logic [31:0] LTD  (int a, int b);         return ftype(8'h1A, 0, a, b);  endfunction
  function automatic logic [31:0] MOVD (int fd, int a);        return rtype(8'h33, fd, a, 0); endfunction
  function automatic logic [31:0] MOVFP2I(int rd, int fs);     return rtype(8'h34, rd, fs, 0); endfunction
  function automatic logic [31:0] MOVI2FP(int fd, int rs);     return rtype(8'h35, fd, rs, 0); endfunction

  // receive registers
  function automatic logic [31:0] SENDRR (int rs1, int rr, int pe); return itype(8'h3C, rr, rs1, pe); endfunction
  function automatic logic [31:0] MOVRR2I(int rd, int rr);          return rtype(8'h38, rd, rr, 0);   endfunction
  // special registers: S0 is the FP status register
  function automatic logic [31:0] MOVI2S(int sd, int rs1);          return rtype(8'h30, sd, rs1, 0);  endfunction
  function automatic logic [31:0] MOVS2I(int rd, int ss);           return rtype(8'h31, rd, ss, 0);   endfunction

endpackage
