// tb_risc_alu: self-checking test of risc_alu.
//
// Drives directed corner cases and 20000 random operand pairs through every
// ALU operation and compares the result and the N/Z/C/V flags with a
// reference model written here from the flag rules (32-bit integer
// arithmetic for carries and overflow, loops for shifts and rotates).
// Combinational block: results are sampled 1 ns after the inputs change.
module tb_risc_alu;
  import risc_pkg::*;

  alu_op_e op;
  word_t   a, b, y, hi;
  flags_t  fi, fo;
  int checks = 0, failures = 0;

  risc_alu dut (.op, .a, .b, .flags_in(fi), .y, .hi, .flags_out(fo));

  // reference model
  task automatic model(input alu_op_e o, input word_t x, input word_t z, input flags_t f,
                       output word_t ry, output word_t rhi, output flags_t rf);
    int unsigned s;
    int sx, sz, ss;
    logic [31:0] p;
    ry = 0; rhi = 0; rf = f; rf.c = 0; rf.v = 0;
    sx = $signed(x); sz = $signed(z);
    case (o)
      ALU_ADD, ALU_ADC: begin
        s  = x + z + ((o == ALU_ADC) ? f.c : 0);
        ss = sx + sz + ((o == ALU_ADC) ? f.c : 0);
        ry = s[15:0]; rf.c = s[16]; rf.v = (ss > 32767 || ss < -32768);
      end
      ALU_SUB, ALU_SBC, ALU_RSB0: begin
        int unsigned xx, bo;
        xx = (o == ALU_RSB0) ? 0 : x;
        bo = (o == ALU_SBC) ? (f.c ? 0 : 1) : 0;
        ss = ((o == ALU_RSB0) ? 0 : sx) - sz - int'(bo);
        ry = 16'(xx - z - bo);
        rf.c = (xx >= z + bo);
        rf.v = (ss > 32767 || ss < -32768);
      end
      ALU_AND: ry = x & z;
      ALU_ORR: ry = x | z;
      ALU_XOR: ry = x ^ z;
      ALU_BIC: ry = x & ~z;
      ALU_MVN: ry = ~z;
      ALU_LSL, ALU_LSR, ALU_ASR: begin
        word_t t; logic c;
        t = x; c = f.c;
        for (int i = 0; i < int'(z) && i < 40; i++) begin
          if (o == ALU_LSL) begin c = t[15]; t = t << 1; end
          else begin c = t[0]; t = (o == ALU_ASR) ? {t[15], t[15:1]} : {1'b0, t[15:1]}; end
        end
        ry = t; rf.c = c;
      end
      ALU_ROR: begin
        word_t t;
        t = x;
        for (int i = 0; i < int'(z % 16); i++) t = {t[0], t[15:1]};
        ry = t; rf.c = (z == 0) ? f.c : t[15];
      end
      ALU_MUL: begin p = x * z; ry = p[15:0]; end
      ALU_MLX: begin p = x * z; ry = p[15:0]; rhi = p[31:16]; end
      default: ;
    endcase
    rf.n = ry[15]; rf.z = (ry == 0);
    if (o == ALU_MLX) begin rf.n = 0; rf.z = (p == 0); end
  endtask

  task automatic run_one(alu_op_e o, word_t x, word_t z, flags_t f);
    word_t ey, ehi; flags_t ef;
    op = o; a = x; b = z; fi = f;
    #1;
    model(o, x, z, f, ey, ehi, ef);
    checks++;
    if (y !== ey || fo !== ef || (o == ALU_MLX && hi !== ehi)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h f=%b: y=%h hi=%h f=%b, expected %h %h %b",
                 o.name(), x, z, f, y, hi, fo, ey, ehi, ef);
    end
  endtask

  localparam alu_op_e OPS [16] = '{ALU_ADD, ALU_SUB, ALU_ADC, ALU_SBC, ALU_RSB0, ALU_AND, ALU_ORR,
                                   ALU_XOR, ALU_BIC, ALU_MVN, ALU_LSL, ALU_LSR, ALU_ASR, ALU_ROR,
                                   ALU_MUL, ALU_MLX};
  localparam word_t CORNER [8] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF,
                                   16'h000F, 16'h0010, 16'h0011};

  initial begin
    foreach (OPS[i]) foreach (CORNER[j]) foreach (CORNER[k])
      for (int f = 0; f < 16; f += 5) run_one(OPS[i], CORNER[j], CORNER[k], 4'(f));
    for (int n = 0; n < 20000; n++) begin
      word_t z;
      z = 16'($urandom);
      if (n % 2 == 0) z = z % 20;     // shift counts near the word size
      run_one(OPS[$urandom % 16], 16'($urandom), z, 4'($urandom));
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
