// tb_benchmark_sizes: builds both fault-secure machines at the sizes of
// several benchmark machines (inputs, outputs, states) and runs each on a
// synthetic transition graph of that size (see bench_run). Sizes:
//   lion 2/1/4, lion9 2/1/9, ex5 2/2/9, dk14 3/5/7, ex2 2/2/19,
//   dk16 2/3/27, bbara 4/2/10, mark1 5/16/15, ex4 6/9/14, bbsse 7/7/16.
// Larger ones (planet 7/19/48, ex1 9/19/20) are left out: their tables have
// 2^inputs entries per state, and elaborating them takes a simulator
// minutes, far longer than the run itself.
// Each run must pass its fault-free checks, and each kind of alarm (state
// parity, Berger, duplication comparator) must be raised in every run.
module tb_benchmark_sizes;

  localparam int NB = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic done [NB];
  int c [NB], f [NB], ap [NB], ab [NB], ad [NB];

  bench_run #(.NI(2), .NO(1),  .NS(4),  .SEED(11)) u_lion   (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]), .alarms_parity(ap[0]), .alarms_berger(ab[0]), .alarms_dup(ad[0]));
  bench_run #(.NI(2), .NO(1),  .NS(9),  .SEED(12)) u_lion9  (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]), .alarms_parity(ap[1]), .alarms_berger(ab[1]), .alarms_dup(ad[1]));
  bench_run #(.NI(2), .NO(3),  .NS(27), .SEED(13)) u_dk16   (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]), .alarms_parity(ap[2]), .alarms_berger(ab[2]), .alarms_dup(ad[2]));
  bench_run #(.NI(3), .NO(5),  .NS(7),  .SEED(14)) u_dk14   (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]), .alarms_parity(ap[3]), .alarms_berger(ab[3]), .alarms_dup(ad[3]));
  bench_run #(.NI(2), .NO(2),  .NS(19), .SEED(15)) u_ex2    (.clk(clk), .done(done[4]), .checks(c[4]), .failures(f[4]), .alarms_parity(ap[4]), .alarms_berger(ab[4]), .alarms_dup(ad[4]));
  bench_run #(.NI(2), .NO(2),  .NS(9),  .SEED(16)) u_ex5    (.clk(clk), .done(done[5]), .checks(c[5]), .failures(f[5]), .alarms_parity(ap[5]), .alarms_berger(ab[5]), .alarms_dup(ad[5]));
  bench_run #(.NI(4), .NO(2),  .NS(10), .SEED(17)) u_bbara  (.clk(clk), .done(done[6]), .checks(c[6]), .failures(f[6]), .alarms_parity(ap[6]), .alarms_berger(ab[6]), .alarms_dup(ad[6]));
  bench_run #(.NI(5), .NO(16), .NS(15), .SEED(18)) u_mark1  (.clk(clk), .done(done[7]), .checks(c[7]), .failures(f[7]), .alarms_parity(ap[7]), .alarms_berger(ab[7]), .alarms_dup(ad[7]));
  bench_run #(.NI(6), .NO(9),  .NS(14), .SEED(19)) u_ex4    (.clk(clk), .done(done[8]), .checks(c[8]), .failures(f[8]), .alarms_parity(ap[8]), .alarms_berger(ab[8]), .alarms_dup(ad[8]));
  bench_run #(.NI(7), .NO(7),  .NS(16), .SEED(20)) u_bbsse  (.clk(clk), .done(done[9]), .checks(c[9]), .failures(f[9]), .alarms_parity(ap[9]), .alarms_berger(ab[9]), .alarms_dup(ad[9]));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    for (int i = 0; i < NB; i++) wait (done[i]);
    for (int i = 0; i < NB; i++) begin
      checks += c[i] + 3;
      failures += f[i];
      if (ap[i] == 0) begin failures++; $display("FAIL run %0d: parity alarm never raised", i); end
      if (ab[i] == 0) begin failures++; $display("FAIL run %0d: Berger alarm never raised", i); end
      if (ad[i] == 0) begin failures++; $display("FAIL run %0d: duplication alarm never raised", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
