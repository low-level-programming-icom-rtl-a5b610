// easy1_cpu_harness: runs one Easy I CPU on a random program and checks it,
// instruction by instruction, against the reference model (easy1_ref_pkg).
//
// The harness holds a behavioural memory with the processor's timing
// (combinational read, write at the clock edge), fills it with random
// instructions (opcodes 00xxx, random I bit and X), resets the CPU and then,
// each time the CPU enters fetch, compares the fetch address and AC with the
// model and the number of cycles the previous instruction took with the
// model's count. At the end the whole memory is compared. Counts of each
// instruction kind, of indirect operands and of taken and untaken branches
// are reported; a kind that never ran counts as a failure.
module easy1_cpu_harness
  import easy1_pkg::*;
  import easy1_ref_pkg::*;
#(
  parameter bit INDIRECT = 1'b1,
  parameter bit MICRO    = 1'b0,
  parameter int N_INSTR  = 3000,
  parameter int SEED     = 1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);

  logic    rst;
  addr_t   mem_addr, pc;
  mem_op_e mem_op;
  word_t   mem_wdata, mem_rdata, ac;
  state_e  state;
  word_t   mem [512];

  easy1_cpu #(.INDIRECT(INDIRECT), .MICROPROGRAMMED(MICRO)) dut (
    .clk(clk), .rst(rst), .mem_addr(mem_addr), .mem_op(mem_op),
    .mem_wdata(mem_wdata), .mem_rdata(mem_rdata), .state(state), .pc(pc), .ac(ac)
  );

  assign mem_rdata = mem[mem_addr[9:1]];
  always @(posedge clk) if (mem_op == MEM_WR) mem[mem_addr[9:1]] <= mem_wdata;

  easy1_model m;
  int n_op [8];
  int n_ind, n_taken, n_untaken;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL [INDIRECT=%0d MICRO=%0d] %s = %h expected %h", INDIRECT, MICRO, what, got, exp);
    end
  endtask

  initial begin
    int cyc, exp_cyc;
    int seed = SEED;
    checks = 0; failures = 0; done = 0;
    n_ind = 0; n_taken = 0; n_untaken = 0;
    m = new(INDIRECT);
    void'($urandom(seed));
    for (int i = 0; i < 512; i++) begin
      // mostly instructions; the two high opcode bits stay 00
      mem[i] = {1'($urandom), 2'b00, 3'($urandom), 10'($urandom)};
      m.mem[i] = mem[i];
    end
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // reset1, reset2: first fetch comes two cycles after reset is released
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (state != ST_FETCH);
    chk(cyc, 2, "cycles from reset to first fetch");
    chk(pc, 2, "PC at first fetch");
    for (int n = 0; n < N_INSTR; n++) begin
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
    end
    for (int i = 0; i < 512; i++) chk(mem[i], m.mem[i], "memory word");
    foreach (n_op[k])
      if (n_op[k] == 0) begin failures++; $display("FAIL opcode %0d never ran", k); end
    if (n_taken == 0)   begin failures++; $display("FAIL no taken branch"); end
    if (n_untaken == 0) begin failures++; $display("FAIL no untaken branch"); end
    if (INDIRECT && n_ind == 0) begin failures++; $display("FAIL no indirect operand"); end
    $display("INDIRECT=%0d MICRO=%0d: ops comp=%0d shr=%0d brn=%0d jump=%0d store=%0d load=%0d and=%0d add=%0d; indirect=%0d taken=%0d untaken=%0d",
             INDIRECT, MICRO, n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7],
             n_ind, n_taken, n_untaken);
    done = 1;
  end

endmodule
