// easy1_ref_pkg: instruction-level reference model of the Easy I machine, for
// the testbenches.
//
// The model executes one instruction per call of step() on its own copy of the
// memory (512 words of 16 bits, byte addresses, bit 0 ignored) and returns
// how many clock cycles the hardware should take for it. Semantics:
//   Comp  AC <- not AC            ShR   AC <- AC / 2 (logical)
//   BrN   AC < 0 => PC <- T       Jump  PC <- T
//   Store MEM[T] <- AC            Load  AC <- MEM[T]
//   And   AC <- AC and V          Add   AC <- AC + V
// With I = 0, T = X and V = X; with I = 1, T = MEM[X] and V = MEM[X]
// (so Load/Store use MEM[MEM[X]]). With indirect = 0 the I bit is ignored.
// Cycle counts: 2 for And/Add/Comp/ShR/Jump and untaken BrN, 3 for Store and
// taken BrN, 4 for Load, plus 2 when an operand is reached indirectly.
package easy1_ref_pkg;

  class easy1_model;
    bit [15:0] mem [512];
    bit [9:0]  pc;
    bit [15:0] ac;
    bit        indirect;
    // last instruction executed
    bit [2:0]  last_op;
    bit        last_ind;
    bit        last_taken;

    function new(bit ind = 1'b1);
      indirect = ind;
      pc = '0;
      ac = '0;
      foreach (mem[i]) mem[i] = '0;
    endfunction

    function bit [15:0] rd(bit [9:0] a);
      return mem[a[9:1]];
    endfunction

    function int step();
      bit [15:0] w;
      bit [2:0]  op;
      bit        ind;
      bit [9:0]  x;
      bit [15:0] v;
      int        cyc;
      w   = rd(pc);
      pc  = pc + 10'd2;
      op  = w[12:10];
      ind = indirect && w[15] && (op[2:1] != 2'b00);
      x   = w[9:0];
      v   = ind ? rd(x) : {6'b0, x};
      cyc = ind ? 4 : 2;
      last_op    = op;
      last_ind   = ind;
      last_taken = 1'b0;
      case (op)
        3'b000: ac = ~ac;
        3'b001: ac = ac >> 1;
        3'b010: if (ac[15]) begin pc = v[9:0]; cyc += 1; last_taken = 1'b1; end
        3'b011: pc = v[9:0];
        3'b100: begin mem[v[9:1]] = ac; cyc += 1; end
        3'b101: begin ac = rd(v[9:0]); cyc += 2; end
        3'b110: ac = ac & v;
        default: ac = ac + v;
      endcase
      return cyc;
    endfunction
  endclass

  // Instruction word from its fields
  function automatic bit [15:0] instr(bit i, bit [4:0] opc, bit [9:0] x);
    return {i, opc, x};
  endfunction

endpackage
