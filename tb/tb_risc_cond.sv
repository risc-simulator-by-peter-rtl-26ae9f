// tb_risc_cond: exhaustive test of risc_cond.
//
// All 16 condition codes against all 16 flag combinations (256 cases),
// checked against the condition definitions written out here as integer
// comparisons: the flags are first turned into a pair of example operands'
// relations (equal, unsigned lower, signed lower).
module tb_risc_cond;
  import risc_pkg::*;

  logic [3:0] cond;
  flags_t     f;
  logic       taken, is_call;
  int checks = 0, failures = 0;

  risc_cond dut (.cond, .f, .taken, .is_call);

  function automatic bit expect_taken(int c, flags_t fl);
    bit eq, lo, lt;
    eq = fl.z;
    lo = !fl.c;                 // unsigned lower: borrow
    lt = (fl.n != fl.v);        // signed less than
    case (c)
      0:  return 1;         1:  return eq;        2:  return !eq;
      3:  return !lo;       4:  return lo;        5:  return fl.n;
      6:  return !fl.n;     7:  return fl.v;      8:  return !fl.v;
      9:  return !lo && !eq;                      10: return lo || eq;
      11: return !lt;       12: return lt;        13: return !lt && !eq;
      14: return lt || eq;  default: return 1;
    endcase
  endfunction

  initial begin
    for (int c = 0; c < 16; c++)
      for (int fl = 0; fl < 16; fl++) begin
        cond = 4'(c); f = 4'(fl);
        #1;
        checks++;
        if (taken !== expect_taken(c, 4'(fl)) || is_call !== (c == 15)) begin
          failures++;
          $display("FAIL cond=%0d flags=%b taken=%b call=%b", c, fl, taken, is_call);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
