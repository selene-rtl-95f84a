// Self-checking testbench for lc_accum, the loop-carried operator stage.
// Three configurations run side by side, each checked by tb_lc_accum_run
// against a model of the control unit's schedule (see there):
//   * II = 2, adder latency 2: every forwarded value bypasses the status
//     buffer, written in the cycle it is read;
//   * II = 3, adder latency 2 and II = 4, adder latency 1: the value waits in
//     the status buffer for one or three cycles before its slot comes round.
// Each must return every context's exact sum with the adder's latency.
module tb_lc_accum;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic done_a, done_b, done_c;

  always #5 clk = ~clk;

  tb_lc_accum_run #(.II(2), .ADD_LAT(2)) u_a (.clk, .rst_n, .done(done_a));
  tb_lc_accum_run #(.II(3), .ADD_LAT(2)) u_b (.clk, .rst_n, .done(done_b));
  tb_lc_accum_run #(.II(4), .ADD_LAT(1)) u_c (.clk, .rst_n, .done(done_c));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done_a && done_b && done_c);
    checks   = u_a.checks + u_b.checks + u_c.checks;
    failures = u_a.failures + u_b.failures + u_c.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    checks   = u_a.checks + u_b.checks + u_c.checks;
    failures = u_a.failures + u_b.failures + u_c.failures + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
