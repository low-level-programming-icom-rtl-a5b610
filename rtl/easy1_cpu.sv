// easy1_cpu: the Easy I central processing unit.
//
// Joins the datapath (easy1_datapath) and a control unit: the hardwired
// easy1_cu by default, or the micro-programmed easy1_ucu when MICROPROGRAMMED
// is set. Both drive identical control words, cycle for cycle. Towards memory it drives the address bus (EAB, from AO), the
// write data (EDB when AC drives it) and the memory operation, and it reads
// the data word back combinationally within the same cycle. After rst is
// released the unit spends two cycles in reset1/reset2 and then fetches the
// instruction at address 0.
//
// The assertions state the bus rules the control unit keeps: DI only captures
// the data bus during a read, and a write always has AC on the data bus. A
// further one checks that IR and DI hold the same instruction after fetch.
module easy1_cpu
  import easy1_pkg::*;
#(
  parameter bit INDIRECT        = 1'b1,
  parameter bit MICROPROGRAMMED = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  // memory interface
  output addr_t   mem_addr,
  output mem_op_e mem_op,
  output word_t   mem_wdata,
  input  word_t   mem_rdata,
  // visible state
  output state_e  state,
  output addr_t   pc,
  output word_t   ac
);

  ctrl_t          ctrl;
  logic           ac15;
  logic [OPC_W:0] ir;
  word_t          di;
  addr_t          ao;

  if (MICROPROGRAMMED) begin : g_ucu
    easy1_ucu #(.INDIRECT(INDIRECT)) u_cu (
      .clk       (clk),
      .rst       (rst),
      .edb_instr (mem_rdata[WORD_W-1 -: OPC_W+1]),
      .ir        (ir),
      .ac15      (ac15),
      .ctrl      (ctrl),
      .state     (state)
    );
  end else begin : g_cu
    easy1_cu #(.INDIRECT(INDIRECT)) u_cu (
      .clk       (clk),
      .rst       (rst),
      .edb_instr (mem_rdata[WORD_W-1 -: OPC_W+1]),
      .ir        (ir),
      .ac15      (ac15),
      .ctrl      (ctrl),
      .state     (state)
    );
  end

  easy1_datapath u_dp (
    .clk       (clk),
    .rst       (rst),
    .ctrl      (ctrl),
    .mem_rdata (mem_rdata),
    .mem_addr  (mem_addr),
    .mem_wdata (mem_wdata),
    .ac15      (ac15),
    .ir        (ir),
    .ac        (ac),
    .di        (di),
    .pc        (pc),
    .ao        (ao)
  );

  assign mem_op = ctrl.mem_op;

  a_di_on_read: assert property (@(posedge clk) disable iff (rst)
    ctrl.di_le |-> ctrl.mem_op == MEM_RD);
  a_write_drives_ac: assert property (@(posedge clk) disable iff (rst)
    ctrl.mem_op == MEM_WR |-> ctrl.edb_sel);
  a_ao_is_bus: assert property (@(posedge clk) mem_addr == ao);
  // The instruction latch and DI agree right after every fetch.
  a_ir_is_instr: assert property (@(posedge clk) disable iff (rst)
    state == ST_FETCH |=> ir == di[WORD_W-1 -: OPC_W+1]);

endmodule
