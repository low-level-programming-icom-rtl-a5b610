// easy1_top: the Easy I stored-program computer.
//
// One Easy I CPU and one memory unit in the von Neumann arrangement: program
// and data share the memory, and the CPU reaches it over an address bus, a
// data word and a memory operation (NOP, RD, WR). The memory is 2^ADDR_W bytes
// of WORD_W-bit words (1 KiB by default).
//
// Use: hold rst high, write the program and its data through ld_we/ld_addr/
// ld_wdata (byte addresses, one word per cycle), then release rst. The CPU
// starts at address 0 two cycles later. dbg_addr/dbg_rdata read any word at
// any time; state, pc, ac, mem_addr and mem_op show the processor's progress.
// The machine has no halt instruction: a program ends in a loop or is stopped
// from outside.
module easy1_top
  import easy1_pkg::*;
#(
  parameter bit INDIRECT        = 1'b1,  // execute the I = 1 (indirect) forms
  parameter bit MICROPROGRAMMED = 1'b0   // control unit: 0 hardwired, 1 micro-programmed
) (
  input  logic    clk,
  input  logic    rst,
  // program load / inspection
  input  logic    ld_we,
  input  addr_t   ld_addr,
  input  word_t   ld_wdata,
  input  addr_t   dbg_addr,
  output word_t   dbg_rdata,
  // visible state
  output state_e  state,
  output addr_t   pc,
  output word_t   ac,
  output addr_t   mem_addr,
  output mem_op_e mem_op
);

  word_t mem_wdata;
  word_t mem_rdata;

  easy1_cpu #(.INDIRECT(INDIRECT), .MICROPROGRAMMED(MICROPROGRAMMED)) u_cpu (
    .clk       (clk),
    .rst       (rst),
    .mem_addr  (mem_addr),
    .mem_op    (mem_op),
    .mem_wdata (mem_wdata),
    .mem_rdata (mem_rdata),
    .state     (state),
    .pc        (pc),
    .ac        (ac)
  );

  easy1_memory u_mem (
    .clk       (clk),
    .addr      (mem_addr),
    .op        (mem_op),
    .wdata     (mem_wdata),
    .rdata     (mem_rdata),
    .ld_we     (ld_we),
    .ld_addr   (ld_addr),
    .ld_wdata  (ld_wdata),
    .dbg_addr  (dbg_addr),
    .dbg_rdata (dbg_rdata)
  );

endmodule
