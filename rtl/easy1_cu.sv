// easy1_cu: hardwired control unit of the Easy I processor.
//
// A state machine with a 4-bit state register. Each state is one
// clock cycle; in it the unit drives one control word (easy1_pkg::ctrl_t) to
// the datapath and chooses the next state from the opcode and from AC bit 15.
// Instruction sequences (one line per cycle):
//   reset:   reset1 (0 -> PC), reset2 (PC -> AO, PC + 2 -> PC)
//   fetch:   AO -> EAB, RD, EDB -> DI, branch on opcode
//   And/Add: aopr   (AC <- ABUS op AC, PC -> AO, PC + 2 -> PC)
//   Comp/ShR:sopr   (AC <- not AC or AC / 2, PC -> AO, PC + 2 -> PC)
//   Load:    load1 (X -> AO), load2 (RD, EDB -> DI), load3 (DI -> AC, restore)
//   Store:   store1 (X -> AO), store2 (AC -> EDB, WR, restore)
//   BrN:     brn1 (restore; if AC<0 go on), brn2 (X -> AO, X + 2 -> PC)
//   Jump:    jump (X -> AO, X + 2 -> PC)
// "restore" re-establishes the fetch invariant: AO holds the address of the
// next instruction and PC the address after it. Cycles per instruction are
// therefore: And/Add/Comp/ShR 2, Load 4, Store 3, Jump 2, BrN 2 (not taken)
// or 3 (taken). The state codes, the control points of each state and the
// transitions follow the processor's state transition table and flowcharts.
//
// During fetch the opcode is taken straight from the memory data bus, since DI
// only captures it at the end of that cycle; in later states it comes from the
// instruction latch IR in the datapath. Only opcode bits 2..0 are decoded.
//
// Design choices where the specification is silent or inconsistent:
//  * fetch always reads memory, also for Comp/ShR.
//  * store2 returns to fetch; the state code 0111 (store3) is kept in the
//    encoding but never entered, and leads to fetch if it ever is.
//  * load3 uses ALU op A with the whole DI word on the ABUS.
//  * rst is synchronous; while it is high the unit drives the idle control
//    word (no memory operation, no register load), so a random power-up state
//    cannot write memory.
//  * With INDIRECT = 1, an instruction with I = 1 (other than Comp/ShR) first
//    spends two cycles fetching its operand word MEM[X] into DI (ind1: X -> AO,
//    ind2: RD, EDB -> DI) and then runs the I = 0 sequence of its opcode on
//    that word: Load/Store/BrN/Jump use it as the address, And/Add use the
//    whole word as operand. This adds 2 cycles. With INDIRECT = 0 the I bit is
//    ignored, as in the specification's control-unit tables.
module easy1_cu
  import easy1_pkg::*;
#(
  parameter bit INDIRECT = 1'b1
) (
  input  logic           clk,
  input  logic           rst,        // synchronous, active high: go to reset1
  input  logic [OPC_W:0] edb_instr,  // I bit and opcode on the memory data bus
  input  logic [OPC_W:0] ir,         // I bit and opcode latched at fetch
  input  logic           ac15,
  output ctrl_t          ctrl,
  output state_e         state
);

  state_e         next;
  logic [OPC_W:0] instr;
  logic           ibit;
  logic [2:0]     opc;

  assign instr = (state == ST_FETCH) ? edb_instr : ir;
  assign ibit  = INDIRECT && instr[OPC_W];
  assign opc   = instr[2:0];

  // Restore the fetch invariant: PC -> AO, PC + 2 -> PC
  function automatic ctrl_t restore(input ctrl_t c);
    ctrl_t r = c;
    r.pc_sel = PC_LOAD;
    r.pc_is  = 1'b1;
    r.ao_sel = 1'b0;
    r.ao_le  = 1'b1;
    return r;
  endfunction

  // Dispatch on the opcode once the operand (or its address) is in DI
  function automatic state_e dispatch(input logic [2:0] o);
    unique case (o)
      OP_COMP[2:0], OP_SHR[2:0]: return ST_SOPR;
      OP_BRN[2:0]:               return ST_BRN1;
      OP_JUMP[2:0]:              return ST_JUMP;
      OP_STORE[2:0]:             return ST_STORE1;
      OP_LOAD[2:0]:              return ST_LOAD1;
      default:                   return ST_AOPR;  // And, Add
    endcase
  endfunction

  always_comb begin
    ctrl = CTRL_IDLE;
    next = ST_FETCH;
    unique case (state)
      ST_RESET1: begin
        ctrl.pc_sel = PC_CLEAR;
        next        = ST_RESET2;
      end
      ST_RESET2: begin
        ctrl = restore(ctrl);
        next = ST_FETCH;
      end
      ST_FETCH: begin
        ctrl.mem_op = MEM_RD;
        ctrl.di_le  = 1'b1;
        ctrl.ir_le  = 1'b1;
        if (ibit && opc[2:1] != 2'b00) next = ST_IND1;
        else                           next = dispatch(opc);
      end
      ST_AOPR: begin
        ctrl           = restore(ctrl);
        ctrl.alu_op    = (opc == OP_ADD[2:0]) ? ALU_ADD : ALU_AND;
        ctrl.ac_le     = 1'b1;
        ctrl.abus_full = ibit;
        next           = ST_FETCH;
      end
      ST_SOPR: begin
        ctrl        = restore(ctrl);
        ctrl.alu_op = (opc == OP_SHR[2:0]) ? ALU_SHRB : ALU_NOTB;
        ctrl.ac_le  = 1'b1;
        next        = ST_FETCH;
      end
      ST_STORE1, ST_LOAD1, ST_IND1: begin
        ctrl.ao_sel = 1'b1;
        ctrl.ao_le  = 1'b1;
        next = (state == ST_STORE1) ? ST_STORE2 :
               (state == ST_LOAD1)  ? ST_LOAD2  : ST_IND2;
      end
      ST_STORE2: begin
        ctrl         = restore(ctrl);
        ctrl.mem_op  = MEM_WR;
        ctrl.edb_sel = 1'b1;
        next         = ST_FETCH;
      end
      ST_LOAD2, ST_IND2: begin
        ctrl.mem_op = MEM_RD;
        ctrl.di_le  = 1'b1;
        next = (state == ST_LOAD2) ? ST_LOAD3 : dispatch(opc);
      end
      ST_LOAD3: begin
        ctrl           = restore(ctrl);
        ctrl.alu_op    = ALU_A;
        ctrl.abus_full = 1'b1;
        ctrl.ac_le     = 1'b1;
        next           = ST_FETCH;
      end
      ST_BRN1: begin
        ctrl = restore(ctrl);
        next = ac15 ? ST_BRN2 : ST_FETCH;
      end
      ST_BRN2, ST_JUMP: begin
        // X -> AO, X + 2 -> PC
        ctrl.pc_sel = PC_LOAD;
        ctrl.pc_is  = 1'b0;
        ctrl.ao_sel = 1'b1;
        ctrl.ao_le  = 1'b1;
        next        = ST_FETCH;
      end
      default: next = ST_FETCH;  // store3: never entered
    endcase
    // While reset is held the state register may still hold anything:
    // drive no memory operation and load no register.
    if (rst) ctrl = CTRL_IDLE;
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_RESET1;
    else     state <= next;
  end

endmodule
