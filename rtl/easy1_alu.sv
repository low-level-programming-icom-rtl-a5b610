// easy1_alu: the Easy I arithmetic/logic unit.
//
// Purely combinational. Operand A comes from DI over the ABUS, operand B is the
// accumulator fed back, and the result goes to the AC input. The five
// operations and their 3-bit codes follow the processor's ALU operation table:
//   000 A      pass A (used to copy a loaded word into AC)
//   001 NOTB   bitwise complement of B
//   010 AND    A and B
//   011 ADD    A + B, modulo 2^WIDTH (two's complement, no carry out)
//   100 SHRB   B / 2
// Design choices: B / 2 is a logical right shift (a zero enters bit 15), and
// the unused codes 101..111 give zero.
module easy1_alu
  import easy1_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_A:    y = a;
      ALU_NOTB: y = ~b;
      ALU_AND:  y = a & b;
      ALU_ADD:  y = a + b;
      ALU_SHRB: y = b >> 1;
      default:  y = '0;
    endcase
  end

endmodule
