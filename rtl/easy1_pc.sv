// easy1_pc: the Easy I program counter.
//
// A register with an input multiplexer and a +2 incrementer (words are two
// bytes in the byte-addressed memory). Two control points steer it:
//   pc_sel 01  0 -> PC                       (reset1)
//   pc_sel 10  (pc_is ? PC : abus) + 2 -> PC (fetch-invariant restore, jumps)
//   pc_sel 11  hold
// pc_is = 1 selects the PC itself, pc_is = 0 the X field on the ABUS; a jump
// therefore leaves PC = X + 2 while AO receives X. The encodings follow the
// control unit's state table. Code 00 is not used by the control unit and is
// treated as hold, a choice of this design. The register updates on the rising
// clock edge; it has no reset of its own, reset1 clears it through pc_sel.
module easy1_pc
  import easy1_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  pc_sel_e       pc_sel,
  input  logic          pc_is,
  input  logic [AW-1:0] abus,
  output logic [AW-1:0] pc
);

  logic [AW-1:0] pc_in;

  assign pc_in = pc_is ? pc : abus;

  always_ff @(posedge clk) begin
    unique case (pc_sel)
      PC_CLEAR: pc <= '0;
      PC_LOAD:  pc <= pc_in + AW'(2);
      default:  pc <= pc;
    endcase
  end

endmodule
