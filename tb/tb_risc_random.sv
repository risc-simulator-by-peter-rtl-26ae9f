// tb_risc_random: random programs on risc_top against an instruction-level model.
//
// For each of 40 seeds, generates a 300-instruction program from almost the
// whole instruction set (ALU, shifts, multiply, MLX, divides, compares,
// forward conditional branches, loads and stores in every addressing mode,
// single and multi-register push/pop, SP arithmetic, flag and LR moves,
// I/O), ending in HLT, and runs it on the full-size top. The same program
// is executed by an instruction-set model written here, which executes
// from its own copy of memory (so stores into code behave alike). At the end
// the testbench compares halted/error, R0-R7, PC, SP, LR, the flags, all 512
// memory words and the sequence of output-device writes. Control transfers
// that could loop (backward branches, RET, register jumps, MOV PC/SP) are left
// out of the random mix; R7 is kept as a fixed base register at 400 for the
// n(Rn) stores so that they do not write over the program.
module tb_risc_random;
  import tb_asm_pkg::*;
  import risc_pkg::flags_t;

  localparam int WORDS = 512;
  localparam int NPROG = 40;
  localparam int NINST = 300;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        host_en, host_we;
  logic [8:0]  host_addr;
  logic [15:0] host_wdata, host_rdata;
  logic [3:0]  io_addr;
  logic [15:0] io_wdata, io_rdata;
  logic        io_wr, io_rd;
  logic        halted, error, div_busy;
  logic [8:0]  pc;
  logic [9:0]  sp;
  flags_t      flags;

  risc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // device model: input values are a fixed function of the request number
  int          n_in;
  logic [19:0] dut_out [$];
  function automatic logic [15:0] in_value(int k); return 16'(k * 7919 + 13); endfunction
  assign io_rdata = in_value(n_in);
  always @(posedge clk) if (rst_n) begin
    if (io_wr) dut_out.push_back({io_addr, io_wdata});
    if (io_rd) n_in <= n_in + 1;
  end

  // ---------------- instruction-set model ----------------
  logic [15:0] m_mem [WORDS];
  logic [15:0] R [8];
  int          m_pc, m_sp, m_in;
  logic [15:0] m_lr;
  bit          fN, fZ, fC, fV, m_halt, m_err;
  logic [19:0] m_out [$];

  function automatic void nz(logic [15:0] v); fN = v[15]; fZ = (v == 0); endfunction

  function automatic logic [15:0] addsub(logic [15:0] a, logic [15:0] b, bit sub, bit use_c);
    int unsigned ua, ub, cin, s;
    int sa, sb, ss;
    ua = a; ub = sub ? 16'(~b) : b;
    cin = use_c ? fC : (sub ? 1 : 0);
    s = ua + ub + cin;
    sa = $signed(a); sb = $signed(ub[15:0]);
    ss = sa + sb + int'(cin);
    fC = s[16];
    fV = (ss > 32767) || (ss < -32768);
    nz(16'(s));
    return 16'(s);
  endfunction

  function automatic logic [15:0] shift(int kind, logic [15:0] a, int unsigned n);
    // kind 0 LSL, 1 LSR, 2 ASR, 3 ROR
    logic [15:0] r;
    r = a;
    if (kind == 3) begin
      for (int i = 0; i < int'(n % 16); i++) r = {r[0], r[15:1]};
      if (n != 0) fC = r[15];
    end else if (n != 0) begin
      for (int unsigned i = 0; i < n && i < 20; i++) begin
        if (kind == 0) begin fC = r[15]; r = {r[14:0], 1'b0}; end
        else begin fC = r[0]; r = {(kind == 2) ? r[15] : 1'b0, r[15:1]}; end
      end
    end
    fV = 0;
    nz(r);
    return r;
  endfunction

  function automatic logic [15:0] logic_res(logic [15:0] v);
    fC = 0; fV = 0; nz(v); return v;
  endfunction

  // returns 0 and sets m_err on divide by zero
  function automatic logic [15:0] divide(int kind, logic [15:0] a, logic [15:0] b);
    // kind 0 UDV, 1 MOD, 2 DIV
    logic [15:0] r;
    if (b == 0) begin m_err = 1; return 0; end
    if (kind == 0) r = a / b;
    else if (kind == 1) r = a % b;
    else r = 16'($signed(a) / $signed(b));
    return logic_res(r);
  endfunction

  function automatic bit cond_ok(int c);
    case (c)
      0: return 1;  1: return fZ;  2: return !fZ;  3: return fC;  4: return !fC;
      5: return fN; 6: return !fN; 7: return fV;   8: return !fV;
      9: return fC && !fZ;  10: return !fC || fZ;
      11: return fN == fV;  12: return fN != fV;
      13: return !fZ && fN == fV;  14: return fZ || fN != fV;
      default: return 1;
    endcase
  endfunction

  function automatic void io_in(int rd);
    R[rd] = in_value(m_in); m_in++;
  endfunction

  function automatic void step();
    logic [15:0] w, t;
    int d, s, b, i8, n4, o6, a9, g;
    w = m_mem[m_pc];
    m_pc = (m_pc + 1) % WORDS;
    if (w[15:11] == 5'b00000) begin m_halt = 1; return; end
    if (w[15:12] inside {[4'h0:4'h5]}) begin
      d = w[10:8]; i8 = w[7:0];
      case (w[15:11])
        5'b00001: begin t = divide(1, R[d], 16'(i8)); if (!m_err) R[d] = t; end
        5'b00010: R[d] = addsub(R[d], 16'(i8), 0, 0);
        5'b00011: R[d] = addsub(R[d], 16'(i8), 1, 0);
        5'b00100: void'(addsub(R[d], 16'(i8), 1, 0));
        5'b00101: R[d] = 16'(i8);
        5'b00110: R[d] = logic_res(R[d] & 16'(i8));
        5'b00111: R[d] = logic_res(R[d] | 16'(i8));
        5'b01000: R[d] = logic_res(R[d] ^ 16'(i8));
        5'b01001: begin t = divide(0, R[d], 16'(i8)); if (!m_err) R[d] = t; end
        5'b01010: R[d] = logic_res(16'(R[d] * 16'(i8)));
        default:  R[w[9:7]] = shift(w[10] ? 0 : 1, R[w[6:4]], w[3:0]);
      endcase
      return;
    end
    if (w[15:12] == 4'h6) begin
      d = w[8:6]; s = w[5:3]; b = w[2:0];
      case (w[11:9])
        0: R[d] = addsub(R[s], R[b], 0, 0);
        1: R[d] = addsub(R[s], R[b], 1, 0);
        2: R[d] = logic_res(R[s] & R[b]);
        3: R[d] = logic_res(R[s] | R[b]);
        4: R[d] = logic_res(R[s] ^ R[b]);
        5: R[d] = shift(1, R[s], R[b]);
        6: R[d] = shift(0, R[s], R[b]);
        default: begin
          int ns;
          ns = w[8] ? m_sp - int'(w[7:0]) : m_sp + int'(w[7:0]);
          if (ns < 0 || ns > WORDS) m_err = 1; else m_sp = ns;
        end
      endcase
      return;
    end
    if (w[15:12] == 4'h7) begin
      case (w[11:8])
        4'h0: R[w[6:4]] = shift(w[7] ? 3 : 2, R[w[6:4]], w[3:0]);
        4'h1: if (w[7]) m_out.push_back({w[3:0], R[w[6:4]]}); else io_in(w[6:4]);
        4'h2: begin
          d = w[4:2];
          if (w[7:5] == 0) begin
            case (w[1:0])
              0: R[d] = {12'b0, fN, fZ, fC, fV};
              1: R[d] = 16'(m_sp);
              2: R[d] = m_lr;
              default: R[d] = 16'(m_pc);
            endcase
          end else if (w[7:5] == 1) begin
            case (w[1:0])
              0: {fN, fZ, fC, fV} = R[d][3:0];
              1: m_sp = R[d] % WORDS;
              2: m_lr = R[d];
              default: m_pc = R[d] % WORDS;
            endcase
          end else if (w[7:5] == 2) begin
            d = w[2:0];
            case (w[4:3])
              0: if (m_sp >= WORDS) m_err = 1; else begin R[d] = m_mem[m_sp]; m_sp++; end
              1: if (m_sp == 0) m_err = 1; else begin m_sp--; m_mem[m_sp] = R[d]; end
              2: m_pc = R[d] % WORDS;
              default: begin m_lr = 16'(m_pc); m_pc = R[d] % WORDS; end
            endcase
          end else if (w[7:0] == 8'h60) m_pc = m_lr % WORDS;
          else if (w[7:6] == 2'b10) R[w[5:3]] = logic_res(~R[w[2:0]]);
          else m_err = 1;
        end
        4'h3: m_err = 1;
        4'h4, 4'h5, 4'h6, 4'h7: begin
          d = w[5:3]; s = w[2:0]; g = w[9:6];
          case (g)
            0: begin t = divide(0, R[d], R[s]); if (!m_err) R[d] = t; end
            1: begin t = divide(1, R[d], R[s]); if (!m_err) R[d] = t; end
            2: begin
              logic [31:0] p;
              p = R[d] * R[s];
              R[d] = p[15:0]; R[s] = p[31:16];
              fN = 0; fC = 0; fV = 0; fZ = (p == 0);
            end
            3: R[d] = shift(2, R[d], R[s]);
            4: R[d] = shift(3, R[d], R[s]);
            5: begin t = divide(2, R[d], R[s]); if (!m_err) R[d] = t; end
            6: R[d] = logic_res(R[d] & ~R[s]);
            7: R[d] = addsub(16'd0, R[s], 1, 0);
            8: io_in(d);
            9: m_out.push_back({R[s][3:0], R[d]});
            10: void'(addsub(R[d], R[s], 1, 0));
            11: void'(logic_res(R[d] & R[s]));
            12: R[d] = R[s];
            13: R[d] = addsub(R[d], R[s], 0, 1);
            14: R[d] = addsub(R[d], R[s], 1, 1);
            default: R[d] = logic_res(16'(R[d] * R[s]));
          endcase
        end
        4'h8, 4'h9: m_mem[(m_sp + w[5:0]) % WORDS] = R[w[8:6]];
        4'hA, 4'hB: R[w[8:6]] = m_mem[(m_sp + w[5:0]) % WORDS];
        4'hC, 4'hD: begin
          for (int i = 0; i <= 8 && !m_err; i++) if (w[i]) begin
            if (m_sp == 0) m_err = 1;
            else begin m_sp--; m_mem[m_sp] = (i == 8) ? m_lr : R[i]; end
          end
        end
        default: begin
          for (int i = 8; i >= 0 && !m_err; i--) if (w[i]) begin
            if (m_sp >= WORDS) m_err = 1;
            else begin
              t = m_mem[m_sp]; m_sp++;
              if (i == 8) m_pc = t % WORDS; else R[i] = t;
            end
          end
        end
      endcase
      return;
    end
    if (w[15:13] == 3'b100) begin
      if (cond_ok(w[12:9])) begin
        if (w[12:9] == 15) m_lr = 16'(m_pc);
        m_pc = w[8:0];
      end
      return;
    end
    a9 = w[8:0]; d = w[11:9];
    case (w[15:12])
      4'hA: m_mem[(R[w[8:6]] + w[5:0]) % WORDS] = R[d];
      4'hB: R[d] = m_mem[(R[w[8:6]] + w[5:0]) % WORDS];
      4'hC: R[d] = addsub(R[d], m_mem[a9], 0, 0);
      4'hD: R[d] = addsub(R[d], m_mem[a9], 1, 0);
      4'hE: m_mem[a9] = R[d];
      default: R[d] = m_mem[a9];
    endcase
  endfunction

  // ---------------- random program generator ----------------
  logic [15:0] img [WORDS];

  function automatic logic [15:0] rand_inst(int at);
    int d, s, b, k;
    d = $urandom % 7; s = $urandom % 8; b = $urandom % 8;
    k = $urandom % 40;
    case (k)
      0:  return MODi(d, 1 + $urandom % 255);
      1:  return ADDi(d, $urandom);
      2:  return SUBi(d, $urandom);
      3:  return CMPi(s, $urandom);
      4:  return MOVi(d, $urandom);
      5:  return ANDi(d, $urandom);
      6:  return ORRi(d, $urandom);
      7:  return XORi(d, $urandom);
      8:  return UDVi(d, 1 + $urandom % 255);
      9:  return MULi(d, $urandom);
      10: return ($urandom % 2) ? LSRi(d, s, $urandom) : LSLi(d, s, $urandom);
      11, 12: return RRR($urandom % 7, d, s, b);
      13: return ($urandom % 2) ? SUBSP($urandom % 8) : ADDSP($urandom % 8);
      14, 15: return BR($urandom % 15, at + 1 + $urandom % 4);   // forward only
      16: return STRo(d, 7, $urandom % 64);
      17: return LDRo(d, s, $urandom);
      18: return ADDd(d, $urandom);
      19: return SUBd(d, $urandom);
      20: return STRd(s, 320 + $urandom % 192);
      21: return LDRd(d, $urandom);
      22: return ($urandom % 2) ? ASRi(d, $urandom) : RORi(d, $urandom);
      23: return ($urandom % 2) ? INPi(d, 2) : OUTi(s, 4 + $urandom % 4);
      24: return MOVfrom(d, $urandom % 4);
      25: return MOVto(($urandom % 2) * 2, s);                  // flags or LR
      26: return POP(d);
      27: return PSH(s);
      28: return MVN(d, s);
      29, 30, 31, 32: begin
        int g;
        g = $urandom % 16;
        if (g == 8) return RR(8, d, 7);                        // INP d, R7 (device 400 & 15)
        if (g == 9) return RR(9, s, 7);
        if (g inside {0, 1, 5} && $urandom % 4 != 0) return RR(g, d, 7);  // mostly non-zero divisor
        if (g == 2) return RR(2, d, ($urandom % 7 == d) ? (d + 1) % 7 : $urandom % 7);
        return RR(g, d, s);
      end
      33: return STRsp(s, 0);
      34: return LDRsp(d, $urandom);
      35: return PSHm($urandom);
      36: return POPm($urandom & 9'h07F);                       // never PC, never R7
      37: return NOP();
      default: return RRR(0, d, s, b);
    endcase
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int cyc, n_err = 0, n_halt = 0;
    rst_n = 1'b0;
    host_en = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int p = 0; p < NPROG; p++) begin
      // R7 = 400 first: MOV R7,#200 ; ADD R7,R7,R7
      for (int i = 0; i < WORDS; i++) img[i] = 16'($urandom);
      img[0] = MOVi(7, 200);
      img[1] = RRR(0, 7, 7, 7);
      img[2] = SUBSP(64);                    // room for pops before the stack is empty
      for (int i = 3; i < NINST; i++) img[i] = rand_inst(i);
      img[NINST] = HLT();
      for (int i = NINST + 1; i < NINST + 5; i++) img[i] = HLT();
      // load
      rst_n = 1'b0;
      host_en = 1; host_we = 1;
      for (int i = 0; i < WORDS; i++) begin
        host_addr = 9'(i); host_wdata = img[i];
        @(posedge clk); #1;
      end
      host_en = 0; host_we = 0;
      n_in = 0;
      dut_out.delete();
      rst_n = 1'b1;
      cyc = 0;
      while (!halted && !error && cyc < 40000) begin @(posedge clk); #1; cyc++; end
      // model
      for (int i = 0; i < WORDS; i++) m_mem[i] = img[i];
      for (int i = 0; i < 8; i++) R[i] = 0;
      m_pc = 0; m_sp = WORDS; m_lr = 0; m_in = 0;
      {fN, fZ, fC, fV} = 4'b0; m_halt = 0; m_err = 0;
      m_out.delete();
      for (int n = 0; n < 5000 && !m_halt && !m_err; n++) step();
      // compare
      check($sformatf("prog %0d halted", p), halted, m_halt);
      check($sformatf("prog %0d error", p), error, m_err);
      for (int i = 0; i < 8; i++)
        check($sformatf("prog %0d R%0d", p, i), dut.u_core.u_rf.regs[i], R[i]);
      check($sformatf("prog %0d PC", p), 32'(pc), 32'(m_pc));
      check($sformatf("prog %0d SP", p), 32'(sp), 32'(m_sp));
      check($sformatf("prog %0d LR", p), dut.u_core.lr_q, m_lr);
      check($sformatf("prog %0d flags", p), flags, {fN, fZ, fC, fV});
      check($sformatf("prog %0d outputs", p), dut_out.size(), m_out.size());
      for (int i = 0; i < m_out.size() && i < dut_out.size(); i++)
        check($sformatf("prog %0d out %0d", p, i), dut_out[i], m_out[i]);
      rst_n = 1'b0;                         // hold the core while reading memory
      for (int i = 0; i < WORDS; i++) begin
        host_en = 1; host_addr = 9'(i);
        @(posedge clk); #1;
        check($sformatf("prog %0d mem[%0d]", p, i), host_rdata, m_mem[i]);
      end
      host_en = 0;
      if (m_err) n_err++;
      if (m_halt) n_halt++;
    end
    $display("programs: %0d halted, %0d stopped with error", n_halt, n_err);
    check("some programs reach HLT", n_halt > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
