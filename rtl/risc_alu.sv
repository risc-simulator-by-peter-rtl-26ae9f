// risc_alu: combinational arithmetic, logic, shift and multiply unit.
//
// y = a op b, with the new N/Z/C/V flags. The flag rules: N and Z always
// follow the result. Add and subtract forms (ADD, SUB, CMP, ADC, SBC, NEG)
// set C and V as on ARM, where C after a subtract is "no borrow", so that BHS
// equals BCS and BLO equals BCC. Shifts set C to the last bit shifted out
// (unchanged for a count of 0) and clear V. Logic operations and MUL clear C
// and V. MLX is an unsigned 16x16 multiply: y is the low word, hi the high
// word, and only Z (of the 32-bit product) may be set, as the instruction set
// defines. The C/V rules for logic, shift and multiply operations are this
// design's choice. Shift counts come from b: any value is allowed, counts
// above 16 give 0 (or all sign bits for ASR), ROR uses the count modulo 16.
// Divide operations are not handled here (see risc_divider).
module risc_alu
  import risc_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  input  flags_t  flags_in,
  output word_t   y,
  output word_t   hi,
  output flags_t  flags_out
);

  logic [16:0] sum;
  logic [16:0] sh17;
  logic [4:0]  n;        // shift count clipped to 17
  logic [3:0]  r;        // rotate count
  logic [31:0] prod;
  logic        arith;    // add/subtract family: V from adder

  always_comb begin
    n     = (b > 16'd17) ? 5'd17 : b[4:0];
    r     = b[3:0];
    prod  = 32'(a) * 32'(b);
    sum   = '0;
    sh17  = '0;
    arith = 1'b0;
    hi    = '0;
    y     = '0;
    flags_out   = flags_in;
    flags_out.c = 1'b0;
    flags_out.v = 1'b0;

    unique case (op)
      ALU_ADD:  begin sum = {1'b0, a} + {1'b0, b};                      arith = 1'b1; end
      ALU_SUB:  begin sum = {1'b0, a} + {1'b0, ~b} + 17'd1;             arith = 1'b1; end
      ALU_ADC:  begin sum = {1'b0, a} + {1'b0, b} + 17'(flags_in.c);    arith = 1'b1; end
      ALU_SBC:  begin sum = {1'b0, a} + {1'b0, ~b} + 17'(flags_in.c);   arith = 1'b1; end
      ALU_RSB0: begin sum = {1'b0, ~b} + 17'd1;                         arith = 1'b1; end
      ALU_AND:  y = a & b;
      ALU_ORR:  y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_BIC:  y = a & ~b;
      ALU_MVN:  y = ~b;
      ALU_LSL: begin
        sh17 = (n > 5'd16) ? 17'd0 : ({1'b0, a} << n);
        y    = sh17[15:0];
        flags_out.c = (n == 5'd0) ? flags_in.c : sh17[16];
      end
      ALU_LSR: begin
        sh17 = (n > 5'd16) ? 17'd0 : ({a, 1'b0} >> n);
        y    = sh17[16:1];
        flags_out.c = (n == 5'd0) ? flags_in.c : sh17[0];
      end
      ALU_ASR: begin
        sh17 = 17'($signed({a, 1'b0}) >>> n);
        y    = sh17[16:1];
        flags_out.c = (n == 5'd0) ? flags_in.c : sh17[0];
      end
      ALU_ROR: begin
        y = (a >> r) | (a << (5'd16 - {1'b0, r}));
        flags_out.c = (b == 16'd0) ? flags_in.c : y[15];
      end
      ALU_MUL:  y = prod[15:0];
      ALU_MLX: begin
        y  = prod[15:0];
        hi = prod[31:16];
      end
      default:  y = '0;   // divider operations
    endcase

    if (arith) begin
      y = sum[15:0];
      flags_out.c = sum[16];
      if (op == ALU_ADD || op == ALU_ADC)
        flags_out.v = (a[15] == b[15]) && (y[15] != a[15]);
      else if (op == ALU_RSB0)
        flags_out.v = b[15] && y[15];          // only 0 - 0x8000 overflows
      else
        flags_out.v = (a[15] != b[15]) && (y[15] != a[15]);
    end

    flags_out.n = y[15];
    flags_out.z = (y == '0);
    if (op == ALU_MLX) begin
      flags_out.n = 1'b0;
      flags_out.z = (prod == '0);
    end
  end

endmodule
