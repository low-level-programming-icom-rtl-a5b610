// tb_easy1_top: end-to-end test of the Easy I computer at its default size.
//
// Three programs are loaded through the load port while the CPU is held in
// reset, and run to completion, each instruction checked against the
// instruction-level reference model (fetch address, PC, AC and cycle count):
//  1. integer division 12 / 4 by repeated subtraction, written for this
//     machine with one indirect Add (a - b computed as not b + 1 + MEM[a]);
//     its loop runs while a is not negative, so it ends with a = -4 and
//     result = 4;
//  2. the same program with the "add a" inside the loop left out (23 words,
//     exit at 46), which ends after one pass with a = -4 and result = 1;
//  3. 3000 random instructions, reaching the forms the division program does
//     not use (ShR, indirect Load/Store/BrN/Jump).
// Memory contents are compared with the model after each program. The
// testbench counts the mechanisms of the machine (each opcode, indirect
// operands, taken and untaken branches, memory writes, the reset sequence)
// and fails if any never occurred.
module tb_easy1_top;
  import easy1_pkg::*;
  import easy1_ref_pkg::*;

  logic    clk = 0, rst;
  logic    ld_we;
  addr_t   ld_addr, dbg_addr, pc, mem_addr;
  word_t   ld_wdata, dbg_rdata, ac;
  state_e  state;
  mem_op_e mem_op;
  int checks = 0, failures = 0;
  int n_op [8];
  int n_ind, n_taken, n_untaken, n_writes, n_resets;

  easy1_top dut (
    .clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_wdata(ld_wdata),
    .dbg_addr(dbg_addr), .dbg_rdata(dbg_rdata), .state(state), .pc(pc), .ac(ac),
    .mem_addr(mem_addr), .mem_op(mem_op)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && mem_op == MEM_WR) n_writes++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s = %h expected %h", what, got, exp);
    end
  endtask

  // Load the image into the memory and the model, reset, and run until the
  // fetch address equals exit_addr or max_instr instructions have run.
  task automatic run(easy1_model m, int exit_addr, int max_instr, string name);
    int cyc, exp_cyc, n;
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < 512; i++) begin
      ld_we = 1; ld_addr = addr_t'(2 * i); ld_wdata = m.mem[i];
      @(negedge clk);
    end
    ld_we = 0;
    @(posedge clk); #1 rst = 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (state != ST_FETCH && cyc < 10);
    chk(cyc, 2, "reset sequence length");
    n_resets++;
    n = 0;
    while (int'(mem_addr) != exit_addr && n < max_instr) begin
      chk(mem_addr, m.pc, "fetch address");
      chk(pc, m.pc + 10'd2, "PC at fetch");
      chk(ac, m.ac, "AC at fetch");
      exp_cyc = m.step();
      n_op[m.last_op]++;
      if (m.last_ind) n_ind++;
      if (m.last_op == 3'b010) begin
        if (m.last_taken) n_taken++; else n_untaken++;
      end
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (state != ST_FETCH && cyc < 20);
      chk(cyc, exp_cyc, "cycles per instruction");
      n++;
    end
    if (exit_addr >= 0) chk(mem_addr, exit_addr, "program reached exit");
    chk(ac, m.ac, "final AC");
    for (int i = 0; i < 512; i++) begin
      dbg_addr = addr_t'(2 * i);
      #1 chk(dbg_rdata, m.mem[i], "memory word");
    end
    $display("%s: %0d instructions", name, n);
  endtask

  task automatic peek_chk(int a, int exp, string what);
    dbg_addr = addr_t'(a);
    #1 chk(int'(dbg_rdata), exp, what);
  endtask

  // Division program image: a at 1000, b at 1004, result at 1008.
  task automatic load_division(easy1_model m, bit with_add);
    word_t p [$];
    p.push_back(instr(0, OP_AND, 0));
    p.push_back(instr(0, OP_ADD, 12));
    p.push_back(instr(0, OP_STORE, 1000));
    p.push_back(instr(0, OP_AND, 0));
    p.push_back(instr(0, OP_ADD, 4));
    p.push_back(instr(0, OP_STORE, 1004));
    p.push_back(instr(0, OP_AND, 0));
    p.push_back(instr(0, OP_STORE, 1008));
    p.push_back(instr(0, OP_LOAD, 1004));              // main: a - b
    p.push_back(instr(0, OP_COMP, 0));
    p.push_back(instr(0, OP_ADD, 1));
    p.push_back(instr(1, OP_ADD, 1000));
    p.push_back(instr(0, OP_BRN, with_add ? 48 : 46)); // exit if a < b
    p.push_back(instr(0, OP_LOAD, 1000));              // loop:
    p.push_back(instr(0, OP_BRN, with_add ? 48 : 46)); // endloop if a < 0
    p.push_back(instr(0, OP_LOAD, 1004));
    p.push_back(instr(0, OP_COMP, 0));
    p.push_back(instr(0, OP_ADD, 1));
    if (with_add) p.push_back(instr(1, OP_ADD, 1000));
    p.push_back(instr(0, OP_STORE, 1000));             // a = a - b
    p.push_back(instr(0, OP_LOAD, 1008));
    p.push_back(instr(0, OP_ADD, 1));
    p.push_back(instr(0, OP_STORE, 1008));             // result++
    p.push_back(instr(0, OP_JUMP, 26));                // jump loop
    foreach (p[i]) m.mem[i] = p[i];
  endtask

  initial begin
    easy1_model m;
    rst = 1; ld_we = 0; ld_addr = 0; ld_wdata = 0; dbg_addr = 0;
    n_ind = 0; n_taken = 0; n_untaken = 0; n_writes = 0; n_resets = 0;

    m = new(1'b1);
    load_division(m, 1'b1);
    run(m, 48, 1000, "division");
    peek_chk(1000, 16'hFFFC, "a after division");
    peek_chk(1004, 4, "b after division");
    peek_chk(1008, 4, "result after division");

    m = new(1'b1);
    load_division(m, 1'b0);
    run(m, 46, 1000, "division without add");
    peek_chk(1000, 16'hFFFC, "a after short program");
    peek_chk(1008, 1, "result after short program");

    m = new(1'b1);
    void'($urandom(7));
    for (int i = 0; i < 512; i++) m.mem[i] = {1'($urandom), 2'b00, 3'($urandom), 10'($urandom)};
    run(m, -1, 3000, "random program");

    foreach (n_op[k])
      if (n_op[k] == 0) begin failures++; $display("FAIL opcode %0d never ran", k); end
    if (n_ind == 0)     begin failures++; $display("FAIL no indirect operand"); end
    if (n_taken == 0)   begin failures++; $display("FAIL no taken branch"); end
    if (n_untaken == 0) begin failures++; $display("FAIL no untaken branch"); end
    if (n_writes == 0)  begin failures++; $display("FAIL no memory write"); end
    if (n_resets == 0)  begin failures++; $display("FAIL no reset sequence"); end
    $display("mechanisms: comp=%0d shr=%0d brn=%0d jump=%0d store=%0d load=%0d and=%0d add=%0d indirect=%0d taken=%0d untaken=%0d writes=%0d resets=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7],
             n_ind, n_taken, n_untaken, n_writes, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
