// risc_top: the complete 16-bit RISC computer: processor core plus memory.
//
// risc_core executes programs held in risc_mem, a unified MEM_WORDS x 16
// memory (512 words by default, the range of the 9-bit address fields).
// The memory's second port is brought out as a host port, used to load a
// program and read back results while the core is held in reset (rst_n low);
// after reset is released the core starts at address 0. The core's I/O bus
// is brought out for external devices: by convention device 2 supplies
// input numbers and devices 4, 5, 6 and 7 display a value as signed,
// unsigned, hexadecimal or character. halted goes high on HLT; error goes
// high when the stack pointer leaves memory, on a divide by zero or on a
// spare encoding. Both stay until reset.
module risc_top
  import risc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = DEF_WORDS,
  parameter int unsigned AW        = $clog2(MEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host access to memory
  input  logic          host_en,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  word_t         host_wdata,
  output word_t         host_rdata,
  // I/O devices
  output logic [3:0]    io_addr,
  output word_t         io_wdata,
  output logic          io_wr,
  output logic          io_rd,
  input  word_t         io_rdata,
  // status
  output logic          halted,
  output logic          error,
  output logic          div_busy,
  output logic [AW-1:0] pc,
  output logic [AW:0]   sp,
  output flags_t        flags
);

  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  word_t         mem_wdata, mem_rdata;

  risc_core #(.MEM_WORDS(MEM_WORDS), .AW(AW)) u_core (
    .clk, .rst_n,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .io_addr, .io_wdata, .io_wr, .io_rd, .io_rdata,
    .halted, .error, .div_busy, .pc, .sp, .flags
  );

  risc_mem #(.WORDS(MEM_WORDS), .AW(AW)) u_mem (
    .clk,
    .a_en(mem_en), .a_we(mem_we), .a_addr(mem_addr), .a_wdata(mem_wdata), .a_rdata(mem_rdata),
    .b_en(host_en), .b_we(host_we), .b_addr(host_addr), .b_wdata(host_wdata), .b_rdata(host_rdata)
  );

endmodule
