// tb_risc_decoder: self-checking test of risc_decoder.
//
// For every instruction form, builds 200 words with random operands using
// the encoders of tb_asm_pkg and checks the decoded operation, ALU
// operation and the operand fields the control unit uses for that form.
// Spare encodings must decode as OP_UNDEF.
module tb_risc_decoder;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  word_t ir;
  dec_t  dec;
  int checks = 0, failures = 0;

  risc_decoder dut (.ir, .dec);

  task automatic expect_dec(string what, w16 w, op_e op, alu_op_e alu, int rd, int rs, int rb,
                            int imm, bit use_alu = 1, bit use_rb = 1, bit use_imm = 1);
    ir = w;
    #1;
    checks++;
    if (dec.op !== op || (use_alu && dec.alu !== alu) || (rd >= 0 && dec.rd !== 3'(rd)) ||
        (rs >= 0 && dec.rs !== 3'(rs)) || (use_rb && rb >= 0 && dec.rb !== 3'(rb)) ||
        (use_imm && imm >= 0 && dec.imm !== 16'(imm))) begin
      failures++;
      if (failures < 30)
        $display("FAIL %s %h: op=%s alu=%s rd=%0d rs=%0d rb=%0d imm=%h", what, w,
                 dec.op.name(), dec.alu.name(), dec.rd, dec.rs, dec.rb, dec.imm);
    end
  endtask

  task automatic expect_field(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  localparam alu_op_e RRR_OPS [7] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_ORR, ALU_XOR, ALU_LSR, ALU_LSL};
  localparam alu_op_e RR_OPS [16] = '{ALU_UDV, ALU_MOD, ALU_MLX, ALU_ASR, ALU_ROR, ALU_DIV, ALU_BIC,
                                      ALU_RSB0, ALU_ADD, ALU_ADD, ALU_SUB, ALU_AND, ALU_ADD, ALU_ADC,
                                      ALU_SBC, ALU_MUL};

  initial begin
    for (int n = 0; n < 200; n++) begin
      int d, s, t, i8, c4, o6, a9, g;
      d = $urandom % 8; s = $urandom % 8; t = $urandom % 8;
      i8 = $urandom % 256; c4 = $urandom % 16; o6 = $urandom % 64; a9 = $urandom % 512;
      g = $urandom % 16;
      expect_dec("HLT", HLT(), OP_HLT, ALU_ADD, -1, -1, -1, -1, 0);
      expect_dec("MODi", MODi(d, i8), OP_ALU_IMM, ALU_MOD, d, d, -1, i8);
      expect_dec("ADDi", ADDi(d, i8), OP_ALU_IMM, ALU_ADD, d, d, -1, i8);
      expect_dec("SUBi", SUBi(d, i8), OP_ALU_IMM, ALU_SUB, d, d, -1, i8);
      expect_dec("CMPi", CMPi(d, i8), OP_ALU_IMM, ALU_SUB, -1, d, -1, i8);
      expect_field("CMPi no_write", dec.no_write, 1);
      expect_dec("MOVi", MOVi(d, i8), OP_MOV_IMM, ALU_ADD, d, -1, -1, i8, 0);
      expect_dec("ANDi", ANDi(d, i8), OP_ALU_IMM, ALU_AND, d, d, -1, i8);
      expect_dec("ORRi", ORRi(d, i8), OP_ALU_IMM, ALU_ORR, d, d, -1, i8);
      expect_dec("XORi", XORi(d, i8), OP_ALU_IMM, ALU_XOR, d, d, -1, i8);
      expect_dec("UDVi", UDVi(d, i8), OP_ALU_IMM, ALU_UDV, d, d, -1, i8);
      expect_field("UDVi is_div", dec.is_div, 1);
      expect_dec("MULi", MULi(d, i8), OP_ALU_IMM, ALU_MUL, d, d, -1, i8);
      expect_field("MULi is_div", dec.is_div, 0);
      expect_dec("LSRi", LSRi(d, s, c4), OP_SHIFT_IMM, ALU_LSR, d, s, -1, c4);
      expect_dec("LSLi", LSLi(d, s, c4), OP_SHIFT_IMM, ALU_LSL, d, s, -1, c4);
      expect_field("LSLi b_imm", dec.b_imm, 1);
      expect_dec("RRR", RRR(n % 7, d, s, t), OP_ALU_RRR, RRR_OPS[n % 7], d, s, t, -1);
      expect_dec("ADDSP", ADDSP(i8), OP_SP_IMM, ALU_ADD, -1, -1, -1, i8);
      expect_dec("SUBSP", SUBSP(i8), OP_SP_IMM, ALU_SUB, -1, -1, -1, i8);
      expect_dec("BR", BR(c4, a9), OP_BRANCH, ALU_ADD, -1, -1, -1, -1, 0);
      expect_field("BR cond", dec.cond, c4);
      expect_field("BR addr", dec.addr, a9);
      expect_dec("STRo", STRo(d, s, o6), OP_STR_OFF, ALU_ADD, d, s, -1, o6, 0);
      expect_dec("LDRo", LDRo(d, s, o6), OP_LDR_OFF, ALU_ADD, d, s, -1, o6, 0);
      expect_dec("ADDd", ADDd(d, a9), OP_ALU_DIR, ALU_ADD, d, d, -1, -1);
      expect_field("ADDd addr", dec.addr, a9);
      expect_dec("SUBd", SUBd(d, a9), OP_ALU_DIR, ALU_SUB, d, d, -1, -1);
      expect_dec("STRd", STRd(d, a9), OP_STR_DIR, ALU_ADD, d, -1, -1, -1, 0);
      expect_dec("LDRd", LDRd(d, a9), OP_LDR_DIR, ALU_ADD, d, -1, -1, -1, 0);
      expect_field("LDRd addr", dec.addr, a9);
      expect_dec("ASRi", ASRi(d, c4), OP_SHIFT_IMM, ALU_ASR, d, d, -1, c4);
      expect_dec("RORi", RORi(d, c4), OP_SHIFT_IMM, ALU_ROR, d, d, -1, c4);
      expect_dec("INPi", INPi(d, c4), OP_INP, ALU_ADD, d, -1, -1, c4, 0);
      expect_field("INPi b_imm", dec.b_imm, 1);
      expect_dec("OUTi", OUTi(d, c4), OP_OUT, ALU_ADD, d, -1, -1, c4, 0);
      expect_dec("MOVfrom", MOVfrom(d, n % 4), OP_MOV_FROM_SP, ALU_ADD, d, -1, -1, -1, 0);
      expect_field("MOVfrom spr", dec.spr, n % 4);
      expect_dec("MOVto", MOVto(n % 4, d), OP_MOV_TO_SP, ALU_ADD, d, -1, -1, -1, 0);
      expect_field("MOVto spr", dec.spr, n % 4);
      expect_dec("POP", POP(d), OP_POP, ALU_ADD, d, -1, -1, -1, 0);
      expect_dec("PSH", PSH(d), OP_PSH, ALU_ADD, d, -1, -1, -1, 0);
      expect_dec("BRAr", BRAr(d), OP_BRA_REG, ALU_ADD, d, -1, -1, -1, 0);
      expect_dec("JMSr", JMSr(d), OP_JMS_REG, ALU_ADD, d, -1, -1, -1, 0);
      expect_dec("RET", RET(), OP_RET, ALU_ADD, -1, -1, -1, -1, 0);
      expect_dec("MVN", MVN(d, s), OP_ALU_RR, ALU_MVN, d, -1, s, -1);
      if (g == 2)
        expect_dec("MLX", RR(g, d, s), OP_MLX, ALU_MLX, d, d, s, -1);
      else if (g == 8)
        expect_dec("INPr", RR(g, d, s), OP_INP, ALU_ADD, d, s, -1, -1, 0, 0, 0);
      else if (g == 9)
        expect_dec("OUTr", RR(g, d, s), OP_OUT, ALU_ADD, d, s, -1, -1, 0, 0, 0);
      else if (g == 12)
        expect_dec("MOVrr", RR(g, d, s), OP_MOV_RR, ALU_ADD, d, -1, s, -1, 0);
      else
        expect_dec($sformatf("RR%0d", g), RR(g, d, s), OP_ALU_RR, RR_OPS[g],
                   (g == 10 || g == 11) ? -1 : d, d, s, -1);
      if (g == 10 || g == 11) expect_field("CMP/TST no_write", dec.no_write, 1);
      expect_dec("STRsp", STRsp(d, o6), OP_STR_SP, ALU_ADD, d, -1, -1, o6, 0);
      expect_dec("LDRsp", LDRsp(d, o6), OP_LDR_SP, ALU_ADD, d, -1, -1, o6, 0);
      expect_dec("PSHm", PSHm(a9), OP_PSH_MULTI, ALU_ADD, -1, -1, -1, -1, 0);
      expect_field("PSHm mask", dec.mask, a9);
      expect_dec("POPm", POPm(a9), OP_POP_MULTI, ALU_ADD, -1, -1, -1, -1, 0);
      expect_field("POPm mask", dec.mask, a9);
      // spares: 7261..727F, 72C0..72FF, 7300..73FF
      expect_dec("spare 726x", 16'h7261 + 16'($urandom % 31), OP_UNDEF, ALU_ADD, -1, -1, -1, -1, 0);
      expect_dec("spare 72Cx", 16'h72C0 + 16'($urandom % 64), OP_UNDEF, ALU_ADD, -1, -1, -1, -1, 0);
      expect_dec("spare 73xx", 16'h7300 + 16'($urandom % 256), OP_UNDEF, ALU_ADD, -1, -1, -1, -1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
