// tb_risc_top: end-to-end test of the whole computer at its default size.
//
// Builds test programs in an image of the 512-word memory with the encoders
// of tb_asm_pkg, loads them through the host port while the core is held in
// reset, runs them to HLT and compares everything the program sends to the
// output devices with values computed here. An I/O device model answers
// input requests on device 2 and records outputs. The main program covers
// every instruction group: immediate, three-register and two-register ALU
// operations, shifts, multiply, MLX, the three divides, every kind of
// branch condition driven by real ALU flags, loops, JMS/RET with the
// standard push/pop-multiple linkage, single and multiple push/pop, all
// addressing modes including wrap-around, ADD/SUB direct, I/O, and the
// special-register moves. Short extra programs then provoke each error
// stop. Counts of the mechanisms seen (divider stall, multi-register push
// and pop, taken and not-taken branches, calls, I/O, halt, error) must all
// be non-zero.
module tb_risc_top;
  import tb_asm_pkg::*;
  import risc_pkg::flags_t;

  localparam int WORDS = 512;

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
  int cycles_total = 0;

  // ---- I/O device model ------------------------------------------------
  logic [15:0] in_vals [4] = '{16'd1234, 16'd4321, 16'd5, 16'd6};
  int          in_idx;
  logic [19:0] outq [$];            // {port, value}
  assign io_rdata = (io_addr == 4'd2) ? in_vals[in_idx % 4] : 16'h0000;
  always @(posedge clk) begin
    cycles_total <= cycles_total + 1;
    if (io_wr) outq.push_back({io_addr, io_wdata});
    if (io_rd) in_idx <= in_idx + 1;
  end

  // ---- mechanism counters ---------------------------------------------
  int n_div_stall = 0, n_mpush = 0, n_mpop = 0, n_taken = 0, n_not_taken = 0;
  int n_call = 0, n_io_in = 0, n_io_out = 0, n_halt = 0, n_error = 0;
  always @(posedge clk) if (rst_n) begin
    if (div_busy) n_div_stall++;
    if (io_rd) n_io_in++;
    if (io_wr) n_io_out++;
    if (dut.u_core.state_q == risc_pkg::S_EXEC) begin
      if (dut.u_core.dec.op == risc_pkg::OP_PSH_MULTI) n_mpush++;
      if (dut.u_core.dec.op == risc_pkg::OP_POP_MULTI) n_mpop++;
      if (dut.u_core.dec.op == risc_pkg::OP_BRANCH) begin
        if (dut.u_core.br_taken) n_taken++; else n_not_taken++;
        if (dut.u_core.br_call) n_call++;
      end
      if (dut.u_core.dec.op inside {risc_pkg::OP_JMS_REG}) n_call++;
    end
  end

  // ---- program image ---------------------------------------------------
  logic [15:0] img [WORDS];
  int          at;                  // next address to emit to
  logic [19:0] expq [$];

  task automatic org(int a); at = a; endtask
  task automatic e(w16 w); img[at] = w; at++; endtask
  // output register r to device p and expect value v
  task automatic out(int r, logic [15:0] v, int p = 5);
    e(OUTi(r, p));
    expq.push_back({4'(p), v});
  endtask
  // load a 9-bit constant in three words (sets the flags)
  task automatic li(int r, int v);
    e(MOVi(r, v / 2)); e(RRR(0, r, r, r)); e(ADDi(r, v % 2));
  endtask
  // branch test: R0 = 0 if cond taken, 1 otherwise, then output it
  task automatic btest(int cond, bit expect_taken);
    e(MOVi(0, 0));
    e(BR(cond, at + 2));
    e(MOVi(0, 1));
    out(0, expect_taken ? 16'd0 : 16'd1);
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clear_image();
    for (int i = 0; i < WORDS; i++) img[i] = 16'h0000;   // HLT
    expq.delete();
    outq.delete();
    at = 0;
  endtask

  // load the image through the host port, run to halt or error
  task automatic run(int max_cycles, output int cyc);
    rst_n = 1'b0;
    in_idx = 0;
    host_en = 1'b1;
    host_we = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      host_addr  = 9'(i);
      host_wdata = img[i];
      @(posedge clk);
      #1;
    end
    host_en = 1'b0;
    host_we = 1'b0;
    outq.delete();
    rst_n = 1'b1;
    cyc = 0;
    while (!halted && !error && cyc < max_cycles) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    if (halted) n_halt++;
    if (error) n_error++;
  endtask

  task automatic read_mem(int a, output logic [15:0] v);
    host_en = 1'b1; host_we = 1'b0; host_addr = 9'(a);
    @(posedge clk); #1;
    host_en = 1'b0;
    v = host_rdata;
  endtask

  task automatic compare_outputs(string name);
    check({name, " output count"}, outq.size(), expq.size());
    for (int i = 0; i < expq.size() && i < outq.size(); i++)
      check($sformatf("%s output %0d (port %0d)", name, i, expq[i][19:16]), outq[i], expq[i]);
  endtask

  // ---- main program ----------------------------------------------------
  localparam int SUB1 = 440, SUB2 = 450, DATA = 470;

  task automatic build_main();
    int l, a;
    clear_image();
    // subroutine 1: R0 += 1, return through LR
    org(SUB1); e(ADDi(0, 1)); e(RET());
    // subroutine 2: standard linkage, nested call, result to DATA
    org(SUB2);
    e(PSHm(9'h10F));                 // PSH {R0-R3,LR}
    e(LDRsp(5, 4)); out(5, 16'd7);   // R0 was pushed first: highest address
    e(LDRsp(5, 0)); expq.push_back({4'd5, 16'(0)});  // LR lowest; patched below
    e(OUTi(5, 5));
    e(MOVi(0, 99)); e(MOVi(1, 0)); e(MOVi(3, 0));
    e(BR(15, SUB1));                 // JMS overwrites LR
    e(STRd(0, DATA));
    e(POPm(9'h10F));                 // POP {PC,R0-R3}
    expq.delete();                   // subroutine outputs are placed in order below

    org(0);
    // immediate and three-register ALU
    e(MOVi(1, 100)); e(MOVi(2, 7));
    e(RRR(0, 3, 1, 2)); out(3, 16'd107);
    e(RRR(1, 3, 1, 2)); out(3, 16'd93);
    e(RRR(1, 3, 2, 1)); out(3, 16'(7 - 100), 4);
    e(RRR(2, 3, 1, 2)); out(3, 16'(100 & 7));
    e(RRR(3, 3, 1, 2)); out(3, 16'(100 | 7));
    e(RRR(4, 3, 1, 2)); out(3, 16'(100 ^ 7));
    e(MOVi(4, 25)); e(MULi(4, 9)); out(4, 16'd225);
    e(MOVi(4, 200)); e(UDVi(4, 7)); out(4, 16'd28);
    e(MOVi(5, 200)); e(MODi(5, 7)); out(5, 16'd4);
    e(MOVi(4, 200)); e(ADDi(4, 55)); e(SUBi(4, 5)); e(ANDi(4, 8'hF6)); e(ORRi(4, 1)); e(XORi(4, 8'h30));
    out(4, ((16'd250 & 16'hF6) | 16'd1) ^ 16'h30);
    // signed and unsigned register divides
    e(MOVi(5, 0)); e(SUBi(5, 100)); e(MOVi(6, 7)); e(RR(5, 5, 6)); out(5, 16'(-14), 4);
    e(MOVi(5, 250)); e(RR(0, 5, 6)); out(5, 16'd35);
    e(MOVi(5, 250)); e(RR(1, 5, 6)); out(5, 16'd5);
    // MLX
    e(MOVi(6, 255)); e(LSLi(6, 6, 8)); e(MOVi(7, 255)); e(RR(2, 6, 7));
    out(6, 16'(32'hFF00 * 32'hFF)); out(7, 16'((32'hFF00 * 32'hFF) >> 16));
    // shifts
    e(MOVi(1, 8'h81)); e(LSLi(1, 1, 8));
    e(ASRi(1, 4)); out(1, 16'hF810);
    e(RORi(1, 4)); out(1, 16'h0F81);
    e(LSRi(2, 1, 3)); out(2, 16'h0F81 >> 3);
    e(MOVi(3, 2));
    e(RRR(6, 4, 1, 3)); out(4, 16'h0F81 << 2);
    e(RRR(5, 4, 1, 3)); out(4, 16'h0F81 >> 2);
    e(MOVi(4, 8'h80)); e(LSLi(4, 4, 8)); e(RR(3, 4, 3)); out(4, 16'hE000);
    e(RR(4, 4, 3)); out(4, 16'h3800);
    // BIC, MVN, NEG, MOV, NOP
    e(MOVi(4, 8'hFF)); e(MOVi(5, 8'h0F)); e(RR(6, 4, 5)); out(4, 16'h00F0);
    e(MVN(5, 5)); out(5, 16'hFFF0);
    e(RR(7, 6, 5)); out(6, 16'h0010);
    e(NOP()); e(RR(12, 7, 6)); out(7, 16'h0010);
    // ADC / SBC
    e(MOVi(1, 255)); e(LSLi(1, 1, 8)); e(ORRi(1, 255)); e(MOVi(2, 1));
    e(RRR(0, 3, 1, 2)); out(3, 16'h0000);         // carry out
    e(MOVi(4, 5)); e(RR(13, 4, 2)); out(4, 16'd7);  // 5 + 1 + C
    e(MOVi(4, 10)); e(RR(14, 4, 2)); out(4, 16'd8); // 10 - 1 - !C (C = 0)
    e(MOVi(4, 10)); e(RR(14, 4, 2)); out(4, 16'd9); // C = 1 now
    // conditions from CMP 5,5: N=0 Z=1 C=1 V=0
    e(MOVi(1, 5)); e(CMPi(1, 5));
    btest(1, 1); btest(2, 0); btest(3, 1); btest(9, 0); btest(10, 1);
    btest(11, 1); btest(13, 0); btest(14, 1);
    // CMP 5,6: N=1 Z=0 C=0 V=0
    e(CMPi(1, 6));
    btest(4, 1); btest(5, 1); btest(6, 0); btest(12, 1); btest(11, 0); btest(9, 0); btest(0, 1);
    // signed overflow 0x7F00 + 0x7F00: N=1 V=1
    e(MOVi(1, 8'h7F)); e(LSLi(1, 1, 8)); e(RRR(0, 2, 1, 1));
    btest(7, 1); btest(8, 0); btest(11, 1); btest(12, 0); btest(13, 1);
    // CMP 6,5 -> higher: C=1 Z=0
    e(MOVi(1, 6)); e(CMPi(1, 5)); btest(9, 1); btest(10, 0); btest(8, 1);
    // TST and register CMP
    e(MOVi(1, 8'hF0)); e(MOVi(2, 8'h0F)); e(RR(11, 1, 2)); btest(1, 1);
    e(RR(10, 2, 1)); btest(5, 1); btest(3, 0);
    // loop: sum 10..1
    e(MOVi(0, 0)); e(MOVi(1, 10));
    l = at; e(RRR(0, 0, 0, 1)); e(SUBi(1, 1)); e(BR(2, l));
    out(0, 16'd55);
    // JMS address / RET, LR
    e(MOVi(0, 41)); a = at; e(BR(15, SUB1)); out(0, 16'd42);
    e(MOVfrom(5, 2)); out(5, 16'(a + 1));
    // standard linkage through SUB2
    e(MOVi(0, 7)); e(MOVi(1, 8)); e(MOVi(2, 9)); e(MOVi(3, 10));
    a = at; e(BR(15, SUB2));
    expq.push_back({4'd5, 16'd7});
    expq.push_back({4'd5, 16'(a + 1)});
    out(0, 16'd7); out(1, 16'd8); out(2, 16'd9); out(3, 16'd10);
    e(LDRd(4, DATA)); out(4, 16'd100);
    e(MOVfrom(5, 1)); out(5, 16'd512);
    // JMS / BRA register forms
    e(MOVi(6, SUB1 / 2)); e(RRR(0, 6, 6, 6));          // R6 = SUB1
    e(MOVi(0, 1)); e(JMSr(6)); out(0, 16'd2);
    e(MOVi(0, 5)); e(MOVi(6, at + 3)); e(BRAr(6)); e(MOVi(0, 6)); out(0, 16'd5);
    // single push / pop and SP arithmetic
    e(MOVi(1, 33)); e(PSH(1)); e(MOVfrom(5, 1)); out(5, 16'd511);
    e(POP(2)); out(2, 16'd33);
    e(SUBSP(20)); e(MOVfrom(5, 1)); out(5, 16'd492);
    // offset addressing
    e(MOVi(1, 240)); e(RRR(0, 1, 1, 1)); e(MOVi(2, 77)); e(STRo(2, 1, 5)); e(LDRo(3, 1, 5));
    out(3, 16'd77);
    e(LDRd(4, 485)); out(4, 16'd77);
    e(MOVi(2, 66)); e(STRsp(2, 3)); e(LDRd(4, 495)); out(4, 16'd66);
    e(LDRsp(5, 3)); out(5, 16'd66);
    e(ADDSP(20)); e(MOVfrom(5, 1)); out(5, 16'd512);
    e(LDRsp(5, 10)); out(5, img[10]);          // 512 + 10 wraps to address 10
    // wrap-around of n(Rn): 984 + 3 -> 475
    e(MOVi(1, 8'hF6)); e(LSLi(1, 1, 2)); e(MOVi(2, 88)); e(STRo(2, 1, 3));
    e(LDRd(3, 475)); out(3, 16'd88);
    // ADD / SUB direct (set flags)
    e(MOVi(1, 10)); e(ADDd(1, 475)); out(1, 16'd98);
    e(SUBd(1, 475)); out(1, 16'd10);
    e(SUBd(1, 475)); out(1, 16'(10 - 88), 4); btest(5, 1); btest(4, 1);
    // input device 2 and output devices 4-7
    e(INPi(1, 2)); out(1, 16'd1234);
    e(MOVi(6, 2)); e(RR(8, 2, 6)); out(2, 16'd4321, 6);
    e(MOVi(6, 7)); e(MOVi(2, 8'h41)); e(RR(9, 2, 6)); expq.push_back({4'd7, 16'h0041});
    // special registers
    a = at; e(MOVfrom(5, 3)); out(5, 16'(a + 1));
    e(MOVi(0, 3)); li(6, at + 3 + 2); e(MOVto(3, 6)); e(MOVi(0, 9)); out(0, 16'd3);
    e(MOVi(1, 8'h0A)); e(MOVto(0, 1)); e(MOVfrom(2, 0)); out(2, 16'h000A);
    btest(5, 1); btest(3, 1); btest(1, 0); btest(7, 0);
    e(MOVi(0, 4)); li(6, at + 3 + 3); e(MOVto(2, 6)); e(RET()); e(MOVi(0, 9)); out(0, 16'd4);
    e(MOVi(6, 255)); e(LSLi(6, 6, 2)); e(MOVto(1, 6)); e(MOVfrom(5, 1)); out(5, 16'd508);
    e(HLT());
    $display("main program: %0d words", at);
    if (at > SUB1) $fatal(1, "main program too long: %0d", at);
  endtask

  // every error program ends in error before its OUT
  task automatic error_case(string name, int n, w16 w0, w16 w1, w16 w2, w16 w3);
    int cyc;
    clear_image();
    e(MOVi(7, 1)); out(7, 16'd1);
    if (n > 0) e(w0);
    if (n > 1) e(w1);
    if (n > 2) e(w2);
    if (n > 3) e(w3);
    e(OUTi(7, 5));
    e(HLT());
    run(1000, cyc);
    check({name, " error"}, error, 1'b1);
    check({name, " not halted"}, halted, 1'b0);
    compare_outputs(name);
  endtask

  initial begin
    int cyc;
    logic [15:0] v;
    rst_n = 1'b0;
    host_en = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;

    build_main();
    run(20000, cyc);
    $display("main program: %0d cycles", cyc);
    check("main halted", halted, 1'b1);
    check("main no error", error, 1'b0);
    compare_outputs("main");
    read_mem(DATA, v); check("mem DATA", v, 16'd100);
    read_mem(475, v);  check("mem 475", v, 16'd88);
    read_mem(511, v);  check("stack top", v, 16'd33);
    check("final sp", sp, 10'd508);

    error_case("push at SP=0", 3, MOVi(0, 0), MOVto(1, 0), PSH(1), 16'h0);
    error_case("pop at SP=512", 1, POP(1), 16'h0, 16'h0, 16'h0);
    error_case("ADD SP beyond", 1, ADDSP(1), 16'h0, 16'h0, 16'h0);
    error_case("SUB SP below", 4, MOVi(0, 3), MOVto(1, 0), SUBSP(4), 16'h0);
    error_case("multi push overflow", 3, MOVi(0, 2), MOVto(1, 0), PSHm(7), 16'h0);
    error_case("multi pop underflow", 2, PSH(7), POPm(3), 16'h0, 16'h0);
    error_case("divide by zero", 3, MOVi(1, 5), MOVi(2, 0), RR(5, 1, 2), 16'h0);
    error_case("spare encoding", 1, 16'h7300, 16'h0, 16'h0, 16'h0);
    error_case("spare 7261", 1, 16'h7261, 16'h0, 16'h0, 16'h0);

    $display("mechanisms: div_stall=%0d mpush=%0d mpop=%0d taken=%0d not_taken=%0d call=%0d in=%0d out=%0d halt=%0d error=%0d",
             n_div_stall, n_mpush, n_mpop, n_taken, n_not_taken, n_call, n_io_in, n_io_out, n_halt, n_error);
    check("seen divider stall", n_div_stall > 0, 1);
    check("seen multi push", n_mpush > 0, 1);
    check("seen multi pop", n_mpop > 0, 1);
    check("seen taken branch", n_taken > 0, 1);
    check("seen untaken branch", n_not_taken > 0, 1);
    check("seen call", n_call > 0, 1);
    check("seen input", n_io_in > 0, 1);
    check("seen output", n_io_out > 0, 1);
    check("seen halt", n_halt > 0, 1);
    check("seen error", n_error > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
