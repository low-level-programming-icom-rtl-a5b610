// easy1_pkg: shared widths, encodings and the control-word type of the Easy I
// accumulator processor.
//
// Easy I is a 16-bit accumulator machine. An instruction word is
//   bit 15 : I, the indirect bit
//   14..10 : opcode (only the three low bits are used; the two high bits are 00)
//    9..0  : X, an address or an immediate
// Memory is byte addressed with a 10-bit address, so words sit at even
// addresses and the program counter advances by 2.
//
// The state codes, ALU operation codes and memory operation codes below are
// the ones of the processor's specification. Two further state codes (IND1,
// IND2, filling the two free 4-bit codes) and the ABUS-width and IR-load
// control points are this design's own: they let the hardwired control unit
// execute the indirect (I = 1) forms of the instructions.
package easy1_pkg;

  localparam int unsigned WORD_W = 16;  // data and instruction word
  localparam int unsigned ADDR_W = 10;  // byte address, = width of X
  localparam int unsigned OPC_W  = 5;   // opcode field

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [OPC_W-1:0]  opcode_t;

  // Opcodes (bits 14..10 of the instruction)
  localparam opcode_t OP_COMP  = 5'b00_000;
  localparam opcode_t OP_SHR   = 5'b00_001;
  localparam opcode_t OP_BRN   = 5'b00_010;
  localparam opcode_t OP_JUMP  = 5'b00_011;
  localparam opcode_t OP_STORE = 5'b00_100;
  localparam opcode_t OP_LOAD  = 5'b00_101;
  localparam opcode_t OP_AND   = 5'b00_110;
  localparam opcode_t OP_ADD   = 5'b00_111;

  // Control-unit states with their 4-bit encodings
  typedef enum logic [3:0] {
    ST_RESET1 = 4'b0000,
    ST_RESET2 = 4'b0001,
    ST_FETCH  = 4'b0010,
    ST_AOPR   = 4'b0011,
    ST_SOPR   = 4'b0100,
    ST_STORE1 = 4'b0101,
    ST_STORE2 = 4'b0110,
    ST_STORE3 = 4'b0111,
    ST_LOAD1  = 4'b1000,
    ST_LOAD2  = 4'b1001,
    ST_LOAD3  = 4'b1010,
    ST_BRN1   = 4'b1011,
    ST_BRN2   = 4'b1100,
    ST_JUMP   = 4'b1101,
    ST_IND1   = 4'b1110,  // indirect: AO <- X
    ST_IND2   = 4'b1111   // indirect: DI <- MEM[X]
  } state_e;

  // ALU operations
  typedef enum logic [2:0] {
    ALU_A    = 3'b000,
    ALU_NOTB = 3'b001,
    ALU_AND  = 3'b010,
    ALU_ADD  = 3'b011,
    ALU_SHRB = 3'b100
  } alu_op_e;

  // Memory (control bus) operations
  typedef enum logic [1:0] {
    MEM_NOP = 2'b00,
    MEM_RD  = 2'b01,
    MEM_WR  = 2'b10
  } mem_op_e;

  // PC select
  typedef enum logic [1:0] {
    PC_KEEP  = 2'b00,  // not used by the control unit; holds
    PC_CLEAR = 2'b01,  // 0 -> PC
    PC_LOAD  = 2'b10,  // (PC or ABUS) + 2 -> PC
    PC_HOLD  = 2'b11
  } pc_sel_e;

  // One cycle's control points
  typedef struct packed {
    alu_op_e alu_op;
    mem_op_e mem_op;
    pc_sel_e pc_sel;
    logic    pc_is;      // PC input select: 1 = PC, 0 = ABUS (X field)
    logic    di_le;      // DI <- EDB
    logic    ac_le;      // AC <- ALU
    logic    ao_sel;     // AO input select: 0 = PC, 1 = ABUS (X field)
    logic    ao_le;      // AO load enable
    logic    edb_sel;    // 1 = AC drives EDB (memory write data)
    logic    abus_full;  // 1 = ABUS carries all 16 bits of DI, 0 = X zero-extended
    logic    ir_le;      // instruction latch (I and opcode) <- EDB
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '{
    alu_op: ALU_A, mem_op: MEM_NOP, pc_sel: PC_HOLD, pc_is: 1'b1,
    di_le: 1'b0, ac_le: 1'b0, ao_sel: 1'b0, ao_le: 1'b0,
    edb_sel: 1'b0, abus_full: 1'b0, ir_le: 1'b0
  };

endpackage
