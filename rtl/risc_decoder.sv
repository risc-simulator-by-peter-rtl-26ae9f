// risc_decoder: combinational instruction decoder.
//
// Takes one 16-bit instruction word and returns a dec_t: the operation class
// for the control unit, the ALU operation, register numbers, the zero-extended
// immediate (immediate value, shift count, offset or I/O port), the 9-bit
// direct/branch address, the branch condition, the special-register selector
// and the push/pop mask. The opcode prefixes (5 to 16 bits, most significant
// first) are the published ones. The layout of the operand fields below each
// prefix is this design's choice: operands are packed right after the prefix
// in the order they are written in assembly, the immediate, count, offset,
// address or mask always in the least significant bits. So, for example,
//   ADD Rd,#imm      = 00010 ddd iiiiiiii
//   LSR Rd,Rs,#n     = 010110 ddd sss nnnn
//   ADD Rd,Rs,Rb     = 0110000 ddd sss bbb
//   STR Rs,off(Rn)   = 1010 sss nnn oooooo
//   B<cond> addr     = 100 cccc aaaaaaaaa
//   MOV Rd,special   = 01110010000 ddd pp   (pp: 0 flags, 1 SP, 2 LR, 3 PC)
// Spare encodings decode to OP_UNDEF. Purely combinational, no clock. The
// immediate is zero-extended to 16 bits so the ALU can take it directly;
// its upper byte is therefore always zero.
module risc_decoder
  import risc_pkg::*;
(
  input  word_t ir,
  output dec_t  dec
);

  always_comb begin
    dec          = '0;
    dec.op       = OP_UNDEF;
    dec.alu      = ALU_ADD;
    dec.addr     = ir[8:0];
    dec.cond     = ir[12:9];
    dec.mask     = ir[8:0];

    unique casez (ir[15:12])
      4'b00??, 4'b010?: begin
        // 5-bit opcode, Rd, #imm8
        dec.rd    = ir[10:8];
        dec.rs    = ir[10:8];
        dec.b_imm = 1'b1;
        dec.imm   = {8'b0, ir[7:0]};
        dec.op    = OP_ALU_IMM;
        unique case (ir[15:11])
          5'b00000: dec.op = OP_HLT;
          5'b00001: begin dec.alu = ALU_MOD; dec.is_div = 1'b1; end
          5'b00010: dec.alu = ALU_ADD;
          5'b00011: dec.alu = ALU_SUB;
          5'b00100: begin dec.alu = ALU_SUB; dec.no_write = 1'b1; end  // CMP
          5'b00101: dec.op  = OP_MOV_IMM;
          5'b00110: dec.alu = ALU_AND;
          5'b00111: dec.alu = ALU_ORR;
          5'b01000: dec.alu = ALU_XOR;
          5'b01001: begin dec.alu = ALU_UDV; dec.is_div = 1'b1; end
          5'b01010: dec.alu = ALU_MUL;
          default: begin  // 01011: LSR/LSL Rd, Rs, #count
            dec.op  = OP_SHIFT_IMM;
            dec.alu = ir[10] ? ALU_LSL : ALU_LSR;
            dec.rd  = ir[9:7];
            dec.rs  = ir[6:4];
            dec.imm = {12'b0, ir[3:0]};
          end
        endcase
      end

      4'b0110: begin
        if (ir[11:9] == 3'b111) begin
          dec.op  = OP_SP_IMM;               // ADD/SUB SP, #imm
          dec.alu = ir[8] ? ALU_SUB : ALU_ADD;
          dec.imm = {8'b0, ir[7:0]};
        end else begin
          dec.op = OP_ALU_RRR;
          dec.rd = ir[8:6];
          dec.rs = ir[5:3];
          dec.rb = ir[2:0];
          unique case (ir[11:9])
            3'b000: dec.alu = ALU_ADD;
            3'b001: dec.alu = ALU_SUB;
            3'b010: dec.alu = ALU_AND;
            3'b011: dec.alu = ALU_ORR;
            3'b100: dec.alu = ALU_XOR;
            3'b101: dec.alu = ALU_LSR;
            default: dec.alu = ALU_LSL;
          endcase
        end
      end

      4'b0111: begin
        unique casez (ir[11:8])
          4'b0000: begin                     // ASR/ROR Rd, #count
            dec.op    = OP_SHIFT_IMM;
            dec.alu   = ir[7] ? ALU_ROR : ALU_ASR;
            dec.rd    = ir[6:4];
            dec.rs    = ir[6:4];
            dec.b_imm = 1'b1;
            dec.imm   = {12'b0, ir[3:0]};
          end
          4'b0001: begin                     // INP Rd, port / OUT Rs, port
            dec.op    = ir[7] ? OP_OUT : OP_INP;
            dec.rd    = ir[6:4];
            dec.b_imm = 1'b1;
            dec.imm   = {12'b0, ir[3:0]};
          end
          4'b0010: begin
            dec.rd  = ir[4:2];
            dec.spr = ir[1:0];
            if (ir[7:5] == 3'b000)      dec.op = OP_MOV_FROM_SP;
            else if (ir[7:5] == 3'b001) dec.op = OP_MOV_TO_SP;
            else if (ir[7:5] == 3'b010) begin
              dec.rd = ir[2:0];
              unique case (ir[4:3])
                2'b00: dec.op = OP_POP;
                2'b01: dec.op = OP_PSH;
                2'b10: dec.op = OP_BRA_REG;
                default: dec.op = OP_JMS_REG;
              endcase
            end else if (ir[7:0] == 8'h60) dec.op = OP_RET;
            else if (ir[7:6] == 2'b10) begin   // MVN Rd, Rs
              dec.op  = OP_ALU_RR;
              dec.alu = ALU_MVN;
              dec.rd  = ir[5:3];
              dec.rs  = ir[5:3];
              dec.rb  = ir[2:0];
            end
            // 7261..727F and 72C0..72FF stay OP_UNDEF
          end
          4'b01??: begin                     // two-register group Rd, Rs
            dec.op = OP_ALU_RR;
            dec.rd = ir[5:3];
            dec.rs = ir[5:3];
            dec.rb = ir[2:0];
            unique case (ir[9:6])
              4'b0000: begin dec.alu = ALU_UDV; dec.is_div = 1'b1; end
              4'b0001: begin dec.alu = ALU_MOD; dec.is_div = 1'b1; end
              4'b0010: begin dec.alu = ALU_MLX; dec.op = OP_MLX; end
              4'b0011: dec.alu = ALU_ASR;
              4'b0100: dec.alu = ALU_ROR;
              4'b0101: begin dec.alu = ALU_DIV; dec.is_div = 1'b1; end
              4'b0110: dec.alu = ALU_BIC;
              4'b0111: dec.alu = ALU_RSB0;   // NEG
              4'b1000: begin dec.op = OP_INP; dec.rs = ir[2:0]; end  // INP Rsd, Ra
              4'b1001: begin dec.op = OP_OUT; dec.rs = ir[2:0]; end  // OUT Rsd, Ra
              4'b1010: begin dec.alu = ALU_SUB; dec.no_write = 1'b1; end  // CMP Rb, Rs
              4'b1011: begin dec.alu = ALU_AND; dec.no_write = 1'b1; end  // TST Rb, Rs
              4'b1100: dec.op  = OP_MOV_RR;
              4'b1101: dec.alu = ALU_ADC;
              4'b1110: dec.alu = ALU_SBC;
              default: dec.alu = ALU_MUL;
            endcase
          end
          4'b100?: begin                     // STR Rs, off(SP)
            dec.op  = OP_STR_SP;
            dec.rd  = ir[8:6];
            dec.imm = {10'b0, ir[5:0]};
          end
          4'b101?: begin                     // LDR Rd, off(SP)
            dec.op  = OP_LDR_SP;
            dec.rd  = ir[8:6];
            dec.imm = {10'b0, ir[5:0]};
          end
          4'b110?: dec.op = OP_PSH_MULTI;
          4'b111?: dec.op = OP_POP_MULTI;
          default: dec.op = OP_UNDEF;        // 73xx spare
        endcase
      end

      4'b100?: dec.op = OP_BRANCH;

      4'b1010, 4'b1011: begin                // STR/LDR Rs, off(Rn)
        dec.op  = ir[12] ? OP_LDR_OFF : OP_STR_OFF;
        dec.rd  = ir[11:9];
        dec.rs  = ir[8:6];
        dec.imm = {10'b0, ir[5:0]};
      end

      default: begin                         // 11xx: direct addressing
        dec.rd = ir[11:9];
        dec.rs = ir[11:9];
        unique case (ir[13:12])
          2'b00: begin dec.op = OP_ALU_DIR; dec.alu = ALU_ADD; end
          2'b01: begin dec.op = OP_ALU_DIR; dec.alu = ALU_SUB; end
          2'b10: dec.op = OP_STR_DIR;
          default: dec.op = OP_LDR_DIR;
        endcase
      end
    endcase
  end

endmodule
