// tb_risc_mem: self-checking test of risc_mem at its default 512 words.
//
// Fills the memory through port B, reads it back through port A and B,
// then runs random traffic on both ports against a shadow array. Checks the
// one-cycle read latency (data of the address presented at an edge appears
// after that edge) and that a read while writing returns the old word.
module tb_risc_mem;
  localparam int WORDS = 512;

  logic        clk = 1'b0;
  logic        a_en, a_we, b_en, b_we;
  logic [8:0]  a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic [15:0] shadow [WORDS];
  int checks = 0, failures = 0;

  risc_mem dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 9'(i); b_wdata = 16'(i * 37 + 5);
      shadow[i] = 16'(i * 37 + 5);
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      a_en = 1; a_addr = 9'(i); b_en = 1; b_addr = 9'(WORDS - 1 - i);
      @(negedge clk);
      check("port A fill readback", a_rdata, shadow[i]);
      check("port B fill readback", b_rdata, shadow[WORDS - 1 - i]);
    end
    for (int n = 0; n < 4000; n++) begin
      logic [15:0] ea, eb;
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); a_addr = 9'($urandom); a_wdata = 16'($urandom);
      b_en = 1; b_we = 1'($urandom); b_addr = 9'($urandom); b_wdata = 16'($urandom);
      if (b_we && a_we && a_addr == b_addr) b_we = 0;
      ea = shadow[a_addr]; eb = shadow[b_addr];
      if (a_we) shadow[a_addr] = a_wdata;
      if (b_we) shadow[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      check("port A read", a_rdata, ea);
      check("port B read", b_rdata, eb);
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
