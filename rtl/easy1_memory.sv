// easy1_memory: the Easy I memory unit, holding both program and data.
//
// The processor sees it through three signals: an address (EAB), a data word
// (EDB) and a memory operation {NOP, RD, WR} coded 00/01/10. Addresses are byte
// addresses of AW bits; every access moves one WORD_W-bit word, so the word
// index is addr[AW-1:1] and bit 0 is ignored. With the default AW = 10 this is
// 1 KiB, 512 words.
//
// Timing: reads are combinational, so the word addressed by AO is on rdata in
// the same cycle and DI captures it at the next rising edge (the fetch and
// load2 steps). rdata always shows the addressed word; RD only tells that the
// processor is using it. A WR stores wdata at the rising edge that ends the
// cycle (store2). The bidirectional data word is split into wdata and rdata.
//
// The ld_* write port and the dbg_* read port are this design's own: they let
// a host load a program and read results while the processor is held in
// reset. A ld_we write takes precedence over a WR in the same cycle.
module easy1_memory
  import easy1_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = WORD_W
) (
  input  logic          clk,
  // processor side
  input  logic [AW-1:0] addr,
  input  mem_op_e       op,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  // program-load and inspection port
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [DW-1:0] ld_wdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [DW-1:0] dbg_rdata
);

  localparam int unsigned WORDS = 2 ** (AW - 1);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we)
      mem[ld_addr[AW-1:1]] <= ld_wdata;
    else if (op == MEM_WR)
      mem[addr[AW-1:1]] <= wdata;
  end

  assign rdata     = mem[addr[AW-1:1]];
  assign dbg_rdata = mem[dbg_addr[AW-1:1]];

endmodule
