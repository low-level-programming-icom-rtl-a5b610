// tb_easy1_datapath: self-checking test of the Easy I datapath.
// Applies 4000 random control words and memory read words and follows DI,
// AC, AO, PC and IR in a shadow model written from the register-transfer
// rules (ABUS = X zero-extended or the whole DI word, ALU operand B = AC,
// PC + 2 incrementer). Also checks the memory-side outputs every cycle.
module tb_easy1_datapath;
  import easy1_pkg::*;

  logic  clk = 0, rst;
  ctrl_t ctrl;
  word_t mem_rdata, mem_wdata, ac, di;
  addr_t mem_addr, pc, ao;
  logic  ac15;
  logic [5:0] ir;
  int checks = 0, failures = 0;

  word_t s_ac, s_di;
  addr_t s_ao, s_pc;
  logic [5:0] s_ir;

  easy1_datapath dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .mem_rdata(mem_rdata), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .ac15(ac15), .ir(ir), .ac(ac), .di(di), .pc(pc), .ao(ao)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s = %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    word_t abus_v, alu_v;
    ctrl = CTRL_IDLE;
    ctrl.pc_sel = PC_CLEAR;
    mem_rdata = '0;
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    s_ac = 0; s_di = 0; s_ao = 0; s_pc = 0; s_ir = 0;
    chk(ac, 0, "AC after reset"); chk(pc, 0, "PC after clear");
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ctrl.alu_op    = alu_op_e'($urandom_range(0, 4));
      ctrl.mem_op    = mem_op_e'($urandom_range(0, 2));
      ctrl.pc_sel    = pc_sel_e'($urandom_range(1, 3));
      ctrl.pc_is     = 1'($urandom);
      ctrl.di_le     = 1'($urandom);
      ctrl.ac_le     = 1'($urandom);
      ctrl.ao_sel    = 1'($urandom);
      ctrl.ao_le     = 1'($urandom);
      ctrl.edb_sel   = 1'($urandom);
      ctrl.abus_full = 1'($urandom);
      ctrl.ir_le     = 1'($urandom);
      mem_rdata      = 16'($urandom);
      #1;
      chk(mem_addr, s_ao, "EAB");
      chk(mem_wdata, ctrl.edb_sel ? s_ac : 0, "EDB out");
      chk(ac15, s_ac[15], "AC15");
      chk(ir, s_ir, "IR");
      chk(di, s_di, "DI");
      // next values
      abus_v = ctrl.abus_full ? s_di : {6'b0, s_di[9:0]};
      case (ctrl.alu_op)
        ALU_A:    alu_v = abus_v;
        ALU_NOTB: alu_v = ~s_ac;
        ALU_AND:  alu_v = abus_v & s_ac;
        ALU_ADD:  alu_v = abus_v + s_ac;
        default:  alu_v = s_ac >> 1;
      endcase
      if (ctrl.ao_le) s_ao = ctrl.ao_sel ? abus_v[9:0] : s_pc;
      case (ctrl.pc_sel)
        PC_CLEAR: s_pc = 0;
        PC_LOAD:  s_pc = (ctrl.pc_is ? s_pc : abus_v[9:0]) + 10'd2;
        default:  ;
      endcase
      if (ctrl.ac_le) s_ac = alu_v;
      if (ctrl.di_le) s_di = mem_rdata;
      if (ctrl.ir_le) s_ir = mem_rdata[15:10];
      @(posedge clk); #1;
      chk(ac, s_ac, "AC"); chk(pc, s_pc, "PC"); chk(ao, s_ao, "AO");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
