// risc_mem: unified program and data memory, WORDS x 16 bits.
//
// Instructions and data share one address space (direct-address loads,
// stores and branches all use the same 9-bit addresses, so the default is
// 512 words). Two synchronous ports: port A for the processor, port B for a
// host that loads programs and reads results. A read returns data in the
// cycle after the address is presented (rdata is registered); a write
// happens on the clock edge. Writes from both ports to the same word in the
// same cycle leave port A's value. The memory holds no reset value. The
// second port and the one-cycle read latency are this design's choices.
module risc_mem #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: processor
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [15:0]   a_wdata,
  output logic [15:0]   a_rdata,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [15:0]   b_wdata,
  output logic [15:0]   b_rdata
);

  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

endmodule
