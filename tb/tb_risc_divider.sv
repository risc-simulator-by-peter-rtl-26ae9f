// tb_risc_divider: self-checking test of risc_divider.
//
// Issues UDV, DIV and MOD operations on corner and random operands, waits
// for done and compares y with SystemVerilog's own / and % operators
// (signed for DIV, truncating toward zero). Also checks the latency: done
// is seen 17 clock edges after the start edge (1 edge for a zero divisor),
// and that div_zero is reported only for a zero divisor.
module tb_risc_divider;
  import risc_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    start = 1'b0;
  alu_op_e op;
  word_t   a, b, y;
  logic    busy, done, div_zero;
  int checks = 0, failures = 0;

  risc_divider dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .div_zero, .y);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic one(alu_op_e o, word_t x, word_t z);
    word_t e;
    int lat;
    @(negedge clk);
    op = o; a = x; b = z; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = 16'($urandom); b = 16'($urandom);   // operands need only be valid with start
    lat = 1;
    while (!done && lat < 40) begin @(negedge clk); lat++; end
    if (z == 0) begin
      check("div_zero", div_zero, 1);
      check("zero latency", lat, 1);
    end else begin
      case (o)
        ALU_UDV: e = x / z;
        ALU_MOD: e = x % z;
        default: e = 16'($signed(x) / $signed(z));
      endcase
      check($sformatf("%s %h %h", o.name(), x, z), y, e);
      check("div_zero low", div_zero, 0);
      check("latency", lat, 17);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(ALU_UDV, 200, 7);
    one(ALU_MOD, 200, 7);
    one(ALU_DIV, 16'(-100), 7);
    one(ALU_DIV, 100, 16'(-7));
    one(ALU_DIV, 16'(-100), 16'(-7));
    one(ALU_DIV, 16'h8000, 16'hFFFF);
    one(ALU_UDV, 16'hFFFF, 1);
    one(ALU_MOD, 16'hFFFF, 16'hFFFF);
    one(ALU_UDV, 5, 0);
    one(ALU_DIV, 5, 0);
    for (int n = 0; n < 3000; n++) begin
      alu_op_e o;
      word_t z;
      o = (n % 3 == 0) ? ALU_UDV : (n % 3 == 1) ? ALU_MOD : ALU_DIV;
      z = 16'($urandom);
      if (n % 4 == 0) z = z % 9;
      one(o, 16'($urandom), z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
