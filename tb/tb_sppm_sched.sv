// tb_sppm_sched -- runs the sequencer in three geometries: the 4x4 example
// with one shared row (Initially Idle 13, Idle 1), 8x8 with two shared rows
// and 6x5 with three shared rows.  See sched_harness for what is checked.
// Also requires that the stall and the Idle-Time gap each happened.
module tb_sppm_sched;
  logic clk = 0, rst_n = 0;
  int c [3], f [3], s [3], g [3];
  logic d [3];
  int checks, failures;

  always #5 clk = ~clk;

  sched_harness #(.M(4), .N(4), .P(1)) h0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .gaps(g[0]), .done(d[0]));
  sched_harness #(.M(8), .N(8), .P(2)) h1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .gaps(g[1]), .done(d[1]));
  sched_harness #(.M(6), .N(5), .P(3)) h2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .gaps(g[2]), .done(d[2]));

  task automatic report(input int extra);
    checks = c[0] + c[1] + c[2] + 3;
    failures = f[0] + f[1] + f[2] + extra;
    for (int i = 0; i < 3; i++) begin
      if (s[i] == 0) begin failures++; $display("FAIL harness %0d saw no stall", i); end
      if (g[i] == 0) begin failures++; $display("FAIL harness %0d saw no idle gap", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d[0] && d[1] && d[2]);
    report(0);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
