// tb_asm_pkg: instruction encoders used by the testbenches.
//
// One function per instruction form, building the 16-bit word from the
// opcode prefixes of the instruction table and the operand-field layout of
// risc_decoder (operands after the prefix in assembly order, immediates in
// the low bits). Written separately from the decoder so that a test of the
// decoder or the CPU does not reuse the code it checks.
package tb_asm_pkg;

  typedef logic [15:0] w16;

  // 5-bit opcode, Rd, #imm8
  function automatic w16 f_imm(input logic [4:0] op, input int rd, input int imm);
    return {op, 3'(rd), 8'(imm)};
  endfunction
  function automatic w16 HLT();                    return 16'h0000; endfunction
  function automatic w16 MODi(int rd, int imm);    return f_imm(5'b00001, rd, imm); endfunction
  function automatic w16 ADDi(int rd, int imm);    return f_imm(5'b00010, rd, imm); endfunction
  function automatic w16 SUBi(int rd, int imm);    return f_imm(5'b00011, rd, imm); endfunction
  function automatic w16 CMPi(int rb, int imm);    return f_imm(5'b00100, rb, imm); endfunction
  function automatic w16 MOVi(int rd, int imm);    return f_imm(5'b00101, rd, imm); endfunction
  function automatic w16 ANDi(int rd, int imm);    return f_imm(5'b00110, rd, imm); endfunction
  function automatic w16 ORRi(int rd, int imm);    return f_imm(5'b00111, rd, imm); endfunction
  function automatic w16 XORi(int rd, int imm);    return f_imm(5'b01000, rd, imm); endfunction
  function automatic w16 UDVi(int rd, int imm);    return f_imm(5'b01001, rd, imm); endfunction
  function automatic w16 MULi(int rd, int imm);    return f_imm(5'b01010, rd, imm); endfunction
  function automatic w16 LSRi(int rd, int rs, int n); return {6'b010110, 3'(rd), 3'(rs), 4'(n)}; endfunction
  function automatic w16 LSLi(int rd, int rs, int n); return {6'b010111, 3'(rd), 3'(rs), 4'(n)}; endfunction

  // three-register forms: sub = 0 ADD, 1 SUB, 2 AND, 3 ORR, 4 XOR, 5 LSR, 6 LSL
  function automatic w16 RRR(int sub, int rd, int rs, int rb);
    return {4'b0110, 3'(sub), 3'(rd), 3'(rs), 3'(rb)};
  endfunction
  function automatic w16 ADDSP(int imm); return {8'h6E, 8'(imm)}; endfunction
  function automatic w16 SUBSP(int imm); return {8'h6F, 8'(imm)}; endfunction

  // branches: cond 0..15 = BRA BEQ BNE BCS BCC BMI BPL BVS BVC BHI BLS BGE BLT BGT BLE JMS
  function automatic w16 BR(int cond, int addr); return {3'b100, 4'(cond), 9'(addr)}; endfunction

  function automatic w16 STRo(int rs, int rn, int off); return {4'hA, 3'(rs), 3'(rn), 6'(off)}; endfunction
  function automatic w16 LDRo(int rd, int rn, int off); return {4'hB, 3'(rd), 3'(rn), 6'(off)}; endfunction
  function automatic w16 ADDd(int rd, int a);  return {4'hC, 3'(rd), 9'(a)}; endfunction
  function automatic w16 SUBd(int rd, int a);  return {4'hD, 3'(rd), 9'(a)}; endfunction
  function automatic w16 STRd(int rs, int a);  return {4'hE, 3'(rs), 9'(a)}; endfunction
  function automatic w16 LDRd(int rd, int a);  return {4'hF, 3'(rd), 9'(a)}; endfunction

  // sub-codes of 0111
  function automatic w16 ASRi(int rd, int n);  return {9'b0111_0000_0, 3'(rd), 4'(n)}; endfunction
  function automatic w16 RORi(int rd, int n);  return {9'b0111_0000_1, 3'(rd), 4'(n)}; endfunction
  function automatic w16 INPi(int rd, int p);  return {9'b0111_0001_0, 3'(rd), 4'(p)}; endfunction
  function automatic w16 OUTi(int rs, int p);  return {9'b0111_0001_1, 3'(rs), 4'(p)}; endfunction
  // special: 0 flags, 1 SP, 2 LR, 3 PC
  function automatic w16 MOVfrom(int rd, int spr); return {11'b0111_0010_000, 3'(rd), 2'(spr)}; endfunction
  function automatic w16 MOVto(int spr, int rs);   return {11'b0111_0010_001, 3'(rs), 2'(spr)}; endfunction
  function automatic w16 POP(int rd);  return {13'b0111_0010_0100_0, 3'(rd)}; endfunction
  function automatic w16 PSH(int rs);  return {13'b0111_0010_0100_1, 3'(rs)}; endfunction
  function automatic w16 BRAr(int rs); return {13'b0111_0010_0101_0, 3'(rs)}; endfunction
  function automatic w16 JMSr(int rs); return {13'b0111_0010_0101_1, 3'(rs)}; endfunction
  function automatic w16 RET();        return 16'h7260; endfunction
  function automatic w16 MVN(int rd, int rs); return {10'b0111_0010_10, 3'(rd), 3'(rs)}; endfunction
  // two-register group, g = 0 UDV 1 MOD 2 MLX 3 ASR 4 ROR 5 DIV 6 BIC 7 NEG
  //   8 INP 9 OUT 10 CMP 11 TST 12 MOV 13 ADC 14 SBC 15 MUL
  function automatic w16 RR(int g, int rd, int rs);
    return {6'b0111_01, 4'(g), 3'(rd), 3'(rs)};
  endfunction
  function automatic w16 STRsp(int rs, int off); return {7'b0111_100, 3'(rs), 6'(off)}; endfunction
  function automatic w16 LDRsp(int rd, int off); return {7'b0111_101, 3'(rd), 6'(off)}; endfunction
  function automatic w16 PSHm(int mask); return {7'b0111_110, 9'(mask)}; endfunction
  function automatic w16 POPm(int mask); return {7'b0111_111, 9'(mask)}; endfunction
  function automatic w16 NOP(); return RR(12, 0, 0); endfunction

endpackage
