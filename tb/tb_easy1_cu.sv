// tb_easy1_cu: self-checking test of the hardwired Easy I control unit.
//
// The testbench plays the datapath: it offers an instruction on the data bus
// during fetch, latches I and opcode when the unit asks for it, and holds a
// chosen AC sign bit. Every cycle it looks the current state, opcode and sign
// up in a transcription of the state transition table and compares the
// control points the table specifies (don't-care columns are skipped) and the
// state that follows. Rows for the two indirect-operand states follow this
// design's extension. 600 random instructions are run after a reset.
module tb_easy1_cu;
  import easy1_pkg::*;

  typedef struct {
    int nxt;     // next state code
    int alu;     // -1 = don't care
    int mem;
    int pcsel;
    int pcis;    // -1 = don't care
    int dile;
    int acle;
    int aosel;   // -1 = don't care
    int aole;
    int edbsel;  // -1 = don't care
  } row_t;

  logic       clk = 0, rst;
  logic [5:0] edb_instr, ir;
  logic       ac15;
  ctrl_t      ctrl;
  state_e     state;
  int checks = 0, failures = 0;
  int seen [16];

  easy1_cu dut (.clk(clk), .rst(rst), .edb_instr(edb_instr), .ir(ir),
                .ac15(ac15), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (ctrl.ir_le) ir <= edb_instr;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int disp(logic [2:0] o);
    casez (o)
      3'b00?: return 4'b0100;
      3'b010: return 4'b1011;
      3'b011: return 4'b1101;
      3'b100: return 4'b0101;
      3'b101: return 4'b1000;
      default: return 4'b0011;
    endcase
  endfunction

  //                                      nxt   alu mem pcsel pcis di ac aosel aole edb
  function automatic row_t lookup(logic [3:0] st, logic [5:0] ins, logic s);
    logic [2:0] o = ins[2:0];
    logic       i = ins[5] && (o[2:1] != 2'b00);
    case (st)
      4'b0000: return '{4'b0001, -1, 0, 2'b01, -1, 0, 0, -1, 0, -1};
      4'b0001: return '{4'b0010, -1, 0, 2'b10,  1, 0, 0,  0, 1, -1};
      4'b0010: return '{i ? 4'b1110 : disp(o),
                                 -1, 1, 2'b11, -1, 1, 0, -1, 0, -1};
      4'b0011: return '{4'b0010, o[0] ? 3'b011 : 3'b010,
                                     0, 2'b10,  1, 0, 1,  0, 1, -1};
      4'b0100: return '{4'b0010, o[0] ? 3'b100 : 3'b001,
                                     0, 2'b10,  1, 0, 1,  0, 1, -1};
      4'b0101: return '{4'b0110, -1, 0, 2'b11, -1, 0, 0,  1, 1, -1};
      4'b0110: return '{4'b0010, -1, 2, 2'b10,  1, 0, 0,  0, 1,  1};
      4'b1000: return '{4'b1001, -1, 0, 2'b11, -1, 0, 0,  1, 1, -1};
      4'b1001: return '{4'b1010, -1, 1, 2'b11, -1, 1, 0, -1, 0, -1};
      4'b1010: return '{4'b0010, -1, 0, 2'b10,  1, 0, 1,  0, 1, -1};
      4'b1011: return '{s ? 4'b1100 : 4'b0010,
                                 -1, 0, 2'b10,  1, 0, 0,  0, 1, -1};
      4'b1100: return '{4'b0010, -1, 0, 2'b10,  0, 0, 0,  1, 1, -1};
      4'b1101: return '{4'b0010, -1, 0, 2'b10,  0, 0, 0,  1, 1, -1};
      4'b1110: return '{4'b1111, -1, 0, 2'b11, -1, 0, 0,  1, 1, -1};
      4'b1111: return '{disp(o), -1, 1, 2'b11, -1, 1, 0, -1, 0, -1};
      default: return '{-2, -1, 0, 2'b11, -1, 0, 0, -1, 0, -1};
    endcase
  endfunction

  task automatic chk(int got, int exp, string what);
    if (exp < 0) return;
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL state=%b %s = %0d, table says %0d", state, what, got, exp);
    end
  endtask

  // Check one cycle: sample at the falling edge, then clock.
  task automatic one_cycle();
    row_t r;
    logic [3:0] cur_st;
    @(negedge clk);
    cur_st = state;
    seen[cur_st]++;
    r = lookup(cur_st, (cur_st == 4'b0010) ? edb_instr : ir, ac15);
    chk(ctrl.alu_op, r.alu, "ALU op");
    chk(ctrl.mem_op, r.mem, "Mem op");
    chk(ctrl.pc_sel, r.pcsel, "PC sel");
    chk(ctrl.pc_is,  r.pcis, "PC is");
    chk(ctrl.di_le,  r.dile, "DI le");
    chk(ctrl.ac_le,  r.acle, "AC le");
    chk(ctrl.ao_sel, r.aosel, "AO sel");
    chk(ctrl.ao_le,  r.aole, "AO le");
    chk(ctrl.edb_sel, r.edbsel, "EDB sel");
    if (cur_st == 4'b0011 && ir[5]) chk(ctrl.abus_full, 1, "ABUS full word");
    if (cur_st == 4'b1010)          chk(ctrl.abus_full, 1, "ABUS full word");
    @(posedge clk); #1;
    chk(state, r.nxt, "next state");
  endtask

  initial begin
    rst = 1; edb_instr = '0; ac15 = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(state, 4'b0000, "state in reset");
    rst = 0;
    one_cycle();  // reset1
    one_cycle();  // reset2
    for (int n = 0; n < 600; n++) begin
      // now in fetch: offer an instruction
      edb_instr = 6'($urandom) & 6'b100111;
      ac15      = 1'($urandom);
      do one_cycle(); while (state != ST_FETCH);
    end
    foreach (seen[k])
      if (k != 4'b0111 && seen[k] == 0) begin
        failures++;
        $display("FAIL state %b never visited", 4'(k));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
