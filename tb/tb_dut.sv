// tb_dut: end-to-end test of the in-circuit verification top in both
// contexts.  One top holds context A (the default configuration), the other
// context B; each runs the stimulus generator's scenario to the end and is
// checked clock by clock, mechanism by mechanism, by lc_scenario_checker.
`timescale 1ns/1ps
module tb_dut;
  import lc_pkg::*;

  logic    clk = 0;
  logic    rst;
  logic    clkout_a, resetout_a, trigger_a, done_a;
  logic    clkout_b, resetout_b, trigger_b, done_b;
  lc_in_t  in_a, in_b;
  lc_out_t out_a, out_b;
  int      checks, failures;

  always #5 clk = ~clk;

  dut u_a (.clk, .rst, .clkout(clkout_a), .resetout(resetout_a), .trigger(trigger_a),
           .done(done_a), .inputs(in_a), .outputs(out_a));
  dut #(.CONTEXT(CTX_B)) u_b (.clk, .rst, .clkout(clkout_b), .resetout(resetout_b),
           .trigger(trigger_b), .done(done_b), .inputs(in_b), .outputs(out_b));

  lc_scenario_checker #(.CONTEXT(CTX_A)) chk_a (.clk, .resetout(rst | resetout_a), .trigger(trigger_a),
           .done(done_a), .inputs(in_a), .outputs(out_a));
  lc_scenario_checker #(.CONTEXT(CTX_B)) chk_b (.clk, .resetout(rst | resetout_b), .trigger(trigger_b),
           .done(done_b), .inputs(in_b), .outputs(out_b));

  initial begin
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    wait (done_a && done_b);
    repeat (3) @(negedge clk);
    chk_a.final_checks();
    chk_b.final_checks();
    checks   = chk_a.checks + chk_b.checks + 1;
    failures = chk_a.failures + chk_b.failures;
    // the generator forwards the clock unchanged
    if (clkout_a !== clk || clkout_b !== clk) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog: scenario did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a.checks + chk_b.checks,
             chk_a.failures + chk_b.failures + 1);
    $finish;
  end

endmodule
