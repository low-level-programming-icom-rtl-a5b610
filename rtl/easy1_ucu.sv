// easy1_ucu: micro-programmed control unit of the Easy I processor.
//
// The same machine as the hardwired easy1_cu, built the other way: the state
// transition table is treated as a program held in a control store. Each row
// of the table is written once, as a micro-instruction row: the current state,
// a pattern over the instruction bits (I and opcode) and over AC bit 15 with
// don't-care masks, the next state and the control word. At elaboration the
// rows are expanded into a 512-word read-only control store addressed by
// {state, I, opcode bits 2..0, AC15}; a row listed later overrides an earlier
// one where both match. In hardware the unit is then just this ROM and the
// 4-bit state register, and changing the machine means changing rows.
//
// Interface, timing and state codes are identical to easy1_cu, so the two
// units are interchangeable in easy1_cpu (parameter MICROPROGRAMMED). As in
// easy1_cu, fetch takes the opcode from the memory data bus and later states
// from the instruction latch; fetch always reads; store2 returns to fetch; the
// indirect-operand states ind1/ind2 are used only when INDIRECT = 1.
module easy1_ucu
  import easy1_pkg::*;
#(
  parameter bit INDIRECT = 1'b1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [OPC_W:0] edb_instr,
  input  logic [OPC_W:0] ir,
  input  logic           ac15,
  output ctrl_t          ctrl,
  output state_e         state
);

  typedef struct packed {
    state_e next;
    ctrl_t  ctrl;
  } uinstr_t;

  typedef struct packed {
    state_e     st;
    logic [3:0] ins;    // {I, opcode[2:0]}
    logic [3:0] ins_m;  // 1 = bit is compared
    logic       ac;
    logic       ac_m;
    uinstr_t    u;
  } urow_t;

  localparam int unsigned NROWS = 23;

  // Control words used by the rows
  //                       alu       mem      pc_sel    is  di  ac  aos aol edb full ir
  localparam ctrl_t C_R1   = '{ALU_A,    MEM_NOP, PC_CLEAR, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_RST  = '{ALU_A,    MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_FET  = '{ALU_A,    MEM_RD,  PC_HOLD,  1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};
  localparam ctrl_t C_AND  = '{ALU_AND,  MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_ADD  = '{ALU_ADD,  MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_ANDM = '{ALU_AND,  MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
  localparam ctrl_t C_ADDM = '{ALU_ADD,  MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
  localparam ctrl_t C_NOT  = '{ALU_NOTB, MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_SHR  = '{ALU_SHRB, MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_XAO  = '{ALU_A,    MEM_NOP, PC_HOLD,  1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_WR   = '{ALU_A,    MEM_WR,  PC_LOAD,  1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0};
  localparam ctrl_t C_RD   = '{ALU_A,    MEM_RD,  PC_HOLD,  1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};
  localparam ctrl_t C_LD3  = '{ALU_A,    MEM_NOP, PC_LOAD,  1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
  localparam ctrl_t C_JMP  = '{ALU_A,    MEM_NOP, PC_LOAD,  1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0};

  // The micro-program: one row per line of the state transition table.
  //  state       {I,opc} mask    AC15 mask  next        control
  localparam urow_t ROWS [NROWS] = '{
    '{ST_RESET1, 4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_RESET2, C_R1}},
    '{ST_RESET2, 4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_FETCH,  C_RST}},
    '{ST_FETCH,  4'b0000, 4'b0110, 1'b0, 1'b0, '{ST_SOPR,   C_FET}},  // 00 00x
    '{ST_FETCH,  4'b0010, 4'b0111, 1'b0, 1'b0, '{ST_BRN1,   C_FET}},  // 00 010
    '{ST_FETCH,  4'b0011, 4'b0111, 1'b0, 1'b0, '{ST_JUMP,   C_FET}},  // 00 011
    '{ST_FETCH,  4'b0100, 4'b0111, 1'b0, 1'b0, '{ST_STORE1, C_FET}},  // 00 100
    '{ST_FETCH,  4'b0101, 4'b0111, 1'b0, 1'b0, '{ST_LOAD1,  C_FET}},  // 00 101
    '{ST_FETCH,  4'b0110, 4'b0110, 1'b0, 1'b0, '{ST_AOPR,   C_FET}},  // 00 11x
    '{ST_AOPR,   4'b0110, 4'b1111, 1'b0, 1'b0, '{ST_FETCH,  C_AND}},
    '{ST_AOPR,   4'b0111, 4'b1111, 1'b0, 1'b0, '{ST_FETCH,  C_ADD}},
    '{ST_SOPR,   4'b0000, 4'b0111, 1'b0, 1'b0, '{ST_FETCH,  C_NOT}},
    '{ST_SOPR,   4'b0001, 4'b0111, 1'b0, 1'b0, '{ST_FETCH,  C_SHR}},
    '{ST_STORE1, 4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_STORE2, C_XAO}},
    '{ST_STORE2, 4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_FETCH,  C_WR}},
    '{ST_LOAD1,  4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_LOAD2,  C_XAO}},
    '{ST_LOAD2,  4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_LOAD3,  C_RD}},
    '{ST_LOAD3,  4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_FETCH,  C_LD3}},
    '{ST_BRN1,   4'b0000, 4'b0000, 1'b0, 1'b1, '{ST_FETCH,  C_RST}},
    '{ST_BRN1,   4'b0000, 4'b0000, 1'b1, 1'b1, '{ST_BRN2,   C_RST}},
    '{ST_BRN2,   4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_FETCH,  C_JMP}},
    '{ST_JUMP,   4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_FETCH,  C_JMP}},
    // indirect forms (I = 1): memory-operand And/Add
    '{ST_AOPR,   4'b1110, 4'b1111, 1'b0, 1'b0, '{ST_FETCH,  C_ANDM}},
    '{ST_AOPR,   4'b1111, 4'b1111, 1'b0, 1'b0, '{ST_FETCH,  C_ADDM}}
  };

  // Rows of the indirect-operand extension, added when INDIRECT = 1
  localparam int unsigned NIROWS = 8;
  localparam urow_t IROWS [NIROWS] = '{
    '{ST_FETCH,  4'b1010, 4'b1110, 1'b0, 1'b0, '{ST_IND1,   C_FET}},  // I, 01x
    '{ST_FETCH,  4'b1100, 4'b1100, 1'b0, 1'b0, '{ST_IND1,   C_FET}},  // I, 1xx
    '{ST_IND1,   4'b0000, 4'b0000, 1'b0, 1'b0, '{ST_IND2,   C_XAO}},
    '{ST_IND2,   4'b0010, 4'b0111, 1'b0, 1'b0, '{ST_BRN1,   C_RD}},
    '{ST_IND2,   4'b0011, 4'b0111, 1'b0, 1'b0, '{ST_JUMP,   C_RD}},
    '{ST_IND2,   4'b0100, 4'b0111, 1'b0, 1'b0, '{ST_STORE1, C_RD}},
    '{ST_IND2,   4'b0101, 4'b0111, 1'b0, 1'b0, '{ST_LOAD1,  C_RD}},
    '{ST_IND2,   4'b0110, 4'b0110, 1'b0, 1'b0, '{ST_AOPR,   C_RD}}
  };

  // Expand the rows into the control store. Unlisted addresses (store3 and,
  // with INDIRECT = 0, ind1/ind2) hold "go to fetch, do nothing".
  function automatic uinstr_t rom_word(logic [8:0] a);
    logic [3:0] st  = a[8:5];
    logic [3:0] ins = a[4:1];
    logic       ac  = a[0];
    uinstr_t    w   = '{ST_FETCH, CTRL_IDLE};
    for (int unsigned r = 0; r < NROWS; r++)
      if (ROWS[r].st == st && ((ins ^ ROWS[r].ins) & ROWS[r].ins_m) == 4'b0000 &&
          (!ROWS[r].ac_m || ROWS[r].ac == ac))
        w = ROWS[r].u;
    if (INDIRECT)
      for (int unsigned r = 0; r < NIROWS; r++)
        if (IROWS[r].st == st && ((ins ^ IROWS[r].ins) & IROWS[r].ins_m) == 4'b0000)
          w = IROWS[r].u;
    return w;
  endfunction

  uinstr_t store [512];

  initial begin
    for (int unsigned a = 0; a < 512; a++) store[a] = rom_word(9'(a));
  end

  logic [OPC_W:0] instr;
  logic           ibit;
  uinstr_t        u;

  assign instr = (state == ST_FETCH) ? edb_instr : ir;
  assign ibit  = INDIRECT && instr[OPC_W];
  assign u     = store[{state, ibit, instr[2:0], ac15}];
  assign ctrl  = rst ? CTRL_IDLE : u.ctrl;  // idle while reset is held

  always_ff @(posedge clk) begin
    if (rst) state <= ST_RESET1;
    else     state <= u.next;
  end

endmodule
