// tb_easy1_pc: self-checking test of the Easy I program counter.
// Applies random sequences of clear, increment (PC + 2), load (X + 2) and
// hold, and compares the register with a shadow value after each clock.
module tb_easy1_pc;
  import easy1_pkg::*;

  logic       clk = 0;
  pc_sel_e    pc_sel;
  logic       pc_is;
  logic [9:0] abus, pc;
  logic [9:0] shadow;
  int checks = 0, failures = 0;

  easy1_pc dut (.clk(clk), .pc_sel(pc_sel), .pc_is(pc_is), .abus(abus), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(logic [1:0] sel, logic is, logic [9:0] x);
    @(negedge clk);
    pc_sel = pc_sel_e'(sel); pc_is = is; abus = x;
    case (sel)
      2'b01: shadow = 10'd0;
      2'b10: shadow = (is ? shadow : x) + 10'd2;
      default: ;
    endcase
    @(posedge clk); #1;
    checks++;
    if (pc !== shadow) begin
      failures++;
      $display("FAIL sel=%b is=%b x=%0d pc=%0d expected %0d", sel, is, x, pc, shadow);
    end
  endtask

  initial begin
    cycle(2'b01, 1'b0, 10'd0);          // reset1: 0 -> PC
    cycle(2'b10, 1'b1, 10'd0);          // PC + 2 -> PC
    cycle(2'b11, 1'b1, 10'd0);          // hold
    cycle(2'b10, 1'b0, 10'd1022);       // X + 2 wraps to 0
    cycle(2'b10, 1'b0, 10'd26);         // jump 26 -> PC = 28
    for (int n = 0; n < 1000; n++)
      cycle(2'($urandom), 1'($urandom), 10'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
