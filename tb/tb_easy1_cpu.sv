// tb_easy1_cpu: self-checking test of the Easy I CPU.
// Four CPUs run random programs side by side: hardwired and micro-programmed
// control units, each built once executing the indirect (I = 1) forms and once
// with INDIRECT = 0, which ignores the I bit. Each is checked against the
// instruction-level reference model, including the cycle count of every
// instruction.
module tb_easy1_cpu;
  logic clk = 0;
  int   c [4], f [4];
  logic d [4];

  always #5 clk = ~clk;

  easy1_cpu_harness #(.INDIRECT(1'b1), .MICRO(1'b0), .N_INSTR(3000), .SEED(11)) h_hw_ind (
    .clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  easy1_cpu_harness #(.INDIRECT(1'b0), .MICRO(1'b0), .N_INSTR(3000), .SEED(23)) h_hw_dir (
    .clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  easy1_cpu_harness #(.INDIRECT(1'b1), .MICRO(1'b1), .N_INSTR(3000), .SEED(37)) h_mp_ind (
    .clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  easy1_cpu_harness #(.INDIRECT(1'b0), .MICRO(1'b1), .N_INSTR(3000), .SEED(41)) h_mp_dir (
    .clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));

  function automatic int total(int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
