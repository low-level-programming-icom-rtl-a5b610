// easy1_datapath: registers and data movement of the Easy I processor.
//
// Registers (all load on the rising clock edge when their enable is set):
//   DI  (16 b)  data in: captures the word on the external data bus (EDB)
//   AC  (16 b)  accumulator: captures the ALU result
//   AO  (10 b)  address out: drives the external address bus (EAB); loads
//               either the PC or the X field from the ABUS
//   PC  (10 b)  program counter, see easy1_pc
//   IR  ( 6 b)  I bit and opcode of the current instruction
// The ABUS carries DI to ALU operand A, to AO and to the PC input. ALU operand
// B is AC, and AC bit 15 (the sign) goes to the control unit for BrN.
//
// Everything is steered by one control word per cycle (easy1_pkg::ctrl_t)
// whose fields are the control points of the processor's state table: ALU op,
// memory op, PC sel, PC is, DI le, AC le, AO sel, AO le and EDB sel.
// This design's own additions: abus_full chooses whether the ABUS carries the
// X field zero-extended (immediates, addresses) or the whole DI word (a loaded
// operand), and IR keeps the I bit and opcode while DI is reused for the
// operand of an indirect instruction. The synchronous reset clears DI, AC, AO
// and IR; the control unit's reset1 state clears the PC.
module easy1_datapath
  import easy1_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  ctrl_t ctrl,
  // memory side
  input  word_t mem_rdata,
  output addr_t mem_addr,
  output word_t mem_wdata,
  // to the control unit
  output logic  ac15,
  output logic [OPC_W:0] ir,
  // visible state
  output word_t ac,
  output word_t di,
  output addr_t pc,
  output addr_t ao
);

  word_t abus;
  word_t alu_y;

  assign abus = ctrl.abus_full ? di : WORD_W'(di[ADDR_W-1:0]);

  easy1_alu u_alu (
    .op (ctrl.alu_op),
    .a  (abus),
    .b  (ac),
    .y  (alu_y)
  );

  easy1_pc u_pc (
    .clk    (clk),
    .pc_sel (ctrl.pc_sel),
    .pc_is  (ctrl.pc_is),
    .abus   (abus[ADDR_W-1:0]),
    .pc     (pc)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      di <= '0;
      ac <= '0;
      ao <= '0;
      ir <= '0;
    end else begin
      if (ctrl.di_le) di <= mem_rdata;
      if (ctrl.ac_le) ac <= alu_y;
      if (ctrl.ao_le) ao <= ctrl.ao_sel ? abus[ADDR_W-1:0] : pc;
      if (ctrl.ir_le) ir <= mem_rdata[WORD_W-1 -: OPC_W+1];
    end
  end

  assign mem_addr  = ao;
  assign mem_wdata = ctrl.edb_sel ? ac : '0;
  assign ac15      = ac[WORD_W-1];

endmodule
