// tb_risc_regfile: self-checking test of risc_regfile.
//
// Checks that reset clears all registers, then runs 5000 cycles of random
// writes and reads on both ports against a shadow array, including reads of
// the register being written in the same cycle (old value expected).
module tb_risc_regfile;
  import risc_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] ra1, ra2, wa;
  word_t      rd1, rd2, wd;
  logic       we;
  word_t      shadow [8];
  int checks = 0, failures = 0;

  risc_regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      shadow[i] = 0;
      ra1 = 3'(i); ra2 = 3'(7 - i); #1;
      checks++;
      if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("FAIL reset value r%0d", i); end
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      ra1 = 3'($urandom); ra2 = (n % 3 == 0) ? wa : 3'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++;
        if (failures < 20) $display("FAIL read r%0d=%h r%0d=%h", ra1, rd1, ra2, rd2);
      end
      @(posedge clk);
      if (we) shadow[wa] = wd;
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
