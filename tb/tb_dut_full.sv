// tb_dut_full: the in-circuit verification top exactly as configured by
// default (context A in the reconfigurable partition), run through the
// stimulus generator's whole scenario and checked by lc_scenario_checker.
`timescale 1ns/1ps
module tb_dut_full;
  import lc_pkg::*;

  logic    clk = 0;
  logic    rst;
  logic    clkout, resetout, trigger, done;
  lc_in_t  inputs;
  lc_out_t outputs;

  always #5 clk = ~clk;

  dut u_dut (.clk, .rst, .clkout, .resetout, .trigger, .done, .inputs, .outputs);

  lc_scenario_checker #(.CONTEXT(CTX_A)) chk (.clk, .resetout(rst | resetout), .trigger,
                                               .done, .inputs, .outputs);

  initial begin
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    wait (done);
    repeat (3) @(negedge clk);
    chk.final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog: scenario did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end

endmodule
