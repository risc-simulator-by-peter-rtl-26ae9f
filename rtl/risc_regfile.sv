// risc_regfile: the eight 16-bit general registers R0-R7.
//
// Two asynchronous read ports and one write port written on the rising clock
// edge when we is high. A read of the register being written returns the old
// value. All registers are cleared by the active-low asynchronous reset. The
// instruction set only names R0-R7; the port count is what the multi-cycle
// control unit needs (two operands per cycle, one result per cycle).
module risc_regfile
  import risc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ra1,
  output word_t      rd1,
  input  logic [2:0] ra2,
  output word_t      rd2,
  input  logic       we,
  input  logic [2:0] wa,
  input  word_t      wd
);

  word_t regs [NREGS];

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

endmodule
