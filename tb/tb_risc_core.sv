// tb_risc_core: self-checking test of risc_core on its own.
//
// The core is connected to a behavioural memory in this testbench (one
// synchronous port, data one cycle after the address, as risc_mem). Each
// case is a short program "setup; X; OUT; HLT": the testbench measures the
// clock cycles X takes (against the same program with X replaced by a NOP)
// and compares them with the control unit's schedule: 3 cycles for register,
// store, branch, I/O and single-push instructions, 4 for loads, single pops,
// direct ADD/SUB and MLX, 20 for divides, 3 + n for a push of n registers and
// 3 + 2n for a pop of n registers. The value sent to the output port is
// checked against the value computed here.
module tb_risc_core;
  import risc_pkg::*;
  import tb_asm_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mem_en, mem_we;
  logic [8:0]  mem_addr;
  word_t       mem_wdata, mem_rdata;
  logic [3:0]  io_addr;
  word_t       io_wdata, io_rdata;
  logic        io_wr, io_rd;
  logic        halted, error, div_busy;
  logic [8:0]  pc;
  logic [9:0]  sp;
  flags_t      flags;
  int checks = 0, failures = 0;

  risc_core dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [512];
  always @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end
  assign io_rdata = 16'd321;

  word_t last_out;
  always @(posedge clk) if (io_wr) last_out <= io_wdata;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // run the program in mem from reset, return cycles to halt
  task automatic run(output int cyc);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!halted && !error && cyc < 500) begin @(negedge clk); cyc++; end
  endtask

  // program: setup words, then x (n words), OUT r, HLT
  task automatic tcase(string name, w16 s0, w16 s1, w16 s2, w16 x, int r, word_t exp_val,
                       int exp_cycles);
    int c_nop, c_x, a;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 512; i++) mem[i] = 16'h0000;
      mem[400] = 16'd1000;                 // data word for loads
      mem[0] = s0; mem[1] = s1; mem[2] = s2;
      mem[3] = (pass == 0) ? NOP() : x;
      mem[4] = OUTi(r, 5);
      mem[5] = HLT();
      if (pass == 0) run(c_nop); else run(c_x);
    end
    check({name, " cycles"}, c_x - c_nop + 3, exp_cycles);
    check({name, " value"}, last_out, exp_val);
    check({name, " no error"}, error, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    tcase("ADD rrr", MOVi(1, 20), MOVi(2, 22), NOP(), RRR(0, 3, 1, 2), 3, 42, 3);
    tcase("MUL imm", MOVi(1, 20), NOP(), NOP(), MULi(1, 3), 1, 60, 3);
    tcase("UDV imm", MOVi(1, 200), NOP(), NOP(), UDVi(1, 9), 1, 22, 20);
    tcase("DIV rr", MOVi(1, 0), SUBi(1, 91), MOVi(2, 7), RR(5, 1, 2), 1, 16'(-13), 20);
    tcase("MLX", MOVi(1, 200), MOVi(2, 200), NOP(), RR(2, 1, 2), 1, 16'(40000), 4);
    tcase("MLX high", MOVi(1, 255), LSLi(1, 1, 8), MOVi(2, 255), RR(2, 1, 2), 2, 16'hFE, 4);
    tcase("LDR direct", NOP(), NOP(), NOP(), LDRd(3, 400), 3, 1000, 4);
    tcase("LDR offset", MOVi(1, 200), RRR(0, 1, 1, 1), NOP(), LDRo(3, 1, 0), 3, 1000, 4);
    tcase("ADD direct", MOVi(3, 24), NOP(), NOP(), ADDd(3, 400), 3, 1024, 4);
    tcase("STR direct", MOVi(3, 5), NOP(), NOP(), STRd(3, 401), 3, 5, 3);
    tcase("PSH", MOVi(3, 5), NOP(), NOP(), PSH(3), 3, 5, 3);
    check("PSH wrote stack", mem[511], 5);
    tcase("POP", MOVi(3, 5), PSH(3), MOVi(3, 0), POP(3), 3, 5, 4);
    tcase("PSH multi 3", MOVi(3, 5), NOP(), NOP(), PSHm(9'h10A), 3, 5, 6);
    check("PSH multi: R1 at top", mem[511], 0);
    check("PSH multi: R3 next", mem[510], 5);
    tcase("POP multi 2", MOVi(3, 5), PSHm(9'h018), MOVi(3, 0), POPm(9'h018), 3, 5, 7);
    tcase("BRA taken", MOVi(3, 5), NOP(), NOP(), BR(0, 4), 3, 5, 3);
    tcase("BEQ not taken", MOVi(3, 5), NOP(), CMPi(3, 4), BR(1, 5), 3, 5, 3);
    tcase("INP", NOP(), NOP(), NOP(), INPi(3, 2), 3, 321, 3);
    tcase("MOV Rd,SP", NOP(), NOP(), NOP(), MOVfrom(3, 1), 3, 512, 3);
    tcase("ADD SP", SUBSP(9), NOP(), NOP(), ADDSP(2), 3, 0, 3);
    check("SP after ADD SP", sp, 505);
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
