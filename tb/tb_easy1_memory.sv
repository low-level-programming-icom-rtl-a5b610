// tb_easy1_memory: self-checking test of the Easy I memory unit.
// Loads every word through the load port, then mixes processor-side writes,
// NOP/RD cycles and reads on both read ports, checking against a shadow
// array. Also checks that byte address bit 0 does not select a different word.
module tb_easy1_memory;
  import easy1_pkg::*;

  logic        clk = 0;
  logic [9:0]  addr, ld_addr, dbg_addr;
  mem_op_e     op;
  logic [15:0] wdata, rdata, ld_wdata, dbg_rdata;
  logic        ld_we;
  logic [15:0] shadow [512];
  int checks = 0, failures = 0;

  easy1_memory dut (
    .clk(clk), .addr(addr), .op(op), .wdata(wdata), .rdata(rdata),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_wdata(ld_wdata),
    .dbg_addr(dbg_addr), .dbg_rdata(dbg_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    op = MEM_NOP; ld_we = 0; addr = 0; wdata = 0; dbg_addr = 0; ld_addr = 0; ld_wdata = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 10'(2 * i); ld_wdata = 16'($urandom);
      shadow[i] = ld_wdata;
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr  = 10'($urandom);
      op    = mem_op_e'($urandom_range(0, 2));
      wdata = 16'($urandom);
      dbg_addr = 10'($urandom);
      #1;
      chk(rdata, shadow[addr[9:1]], "rdata");
      chk(dbg_rdata, shadow[dbg_addr[9:1]], "dbg_rdata");
      if (op == MEM_WR) shadow[addr[9:1]] = wdata;
      @(posedge clk); #1;
      dbg_addr = addr ^ 10'd1;  // same word through the odd byte address
      #1;
      chk(dbg_rdata, shadow[addr[9:1]], "after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
