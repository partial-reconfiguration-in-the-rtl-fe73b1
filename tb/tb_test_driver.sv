// tb_test_driver: checks the stimulus generator clock by clock.
// Expected behaviour: resetout for RESET_CYCLES clocks, trigger for one,
// then each scenario vector for its hold time, then (LOOP = 0) all inputs
// low with done set, or (LOOP = 1) a new reset phase and a replay.  Two
// generators are run: the default one and a looping one with a shorter
// reset phase.
`timescale 1ns/1ps
module tb_test_driver;
  import lc_pkg::*;

  logic   clk = 0, rst;
  logic   clkout0, resetout0, trigger0, done0;
  logic   clkout1, resetout1, trigger1, done1;
  lc_in_t stim0, stim1;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_driver u0 (.clk, .rst, .clkout(clkout0), .resetout(resetout0), .trigger(trigger0),
                  .stim(stim0), .done(done0));
  test_driver #(.RESET_CYCLES(2), .LOOP(1'b1)) u1 (.clk, .rst, .clkout(clkout1),
                  .resetout(resetout1), .trigger(trigger1), .stim(stim1), .done(done1));

  // The scenario: {vector, clocks}.
  int unsigned sc_vec[$]  = '{'h000, 'h080, 'h000, 'h010, 'h030, 'h130, 'h030, 'h034,
                              'h074, 'h034, 'h03C, 'h01C, 'h00C, 'h00D, 'h005, 'h105,
                              'h005, 'h205, 'h005, 'h004, 'h044, 'h000,
                              'h080, 'h014, 'h03C, 'h014, 'h015, 'h017, 'h015, 'h005,
                              'h001, 'h000};
  int unsigned sc_hold[$] = '{3, 1, 2, 2, 3, 1, 2, 2, 1, 2, 3, 2, 2, 2, 2, 2, 1, 1, 2, 2, 1, 3,
                              1, 2, 3, 2, 2, 2, 2, 2, 2, 3};

  // one clock of expectation for both generators
  task automatic expect_clk(input logic r0, t0, d0, input int unsigned v0,
                            input logic r1, t1, input int unsigned v1);
    checks++;
    if ({resetout0, trigger0, done0} !== {r0, t0, d0} || stim0 !== 10'(v0)) begin
      failures++;
      $display("%0t gen0: r%b t%b d%b stim %h, expected r%b t%b d%b stim %h",
               $time, resetout0, trigger0, done0, stim0, r0, t0, d0, v0);
    end
    checks++;
    if ({resetout1, trigger1, done1} !== {r1, t1, 1'b0} || stim1 !== 10'(v1)) begin
      failures++;
      $display("%0t gen1: r%b t%b d%b stim %h, expected r%b t%b 0 stim %h",
               $time, resetout1, trigger1, done1, stim1, r1, t1, v1);
    end
    @(negedge clk);
  endtask

  initial begin
    int unsigned e0_r[$], e0_t[$], e0_d[$], e0_v[$];
    int unsigned e1_r[$], e1_t[$], e1_v[$];
    // expected per-clock trace of generator 0
    repeat (4) begin e0_r.push_back(1); e0_t.push_back(0); e0_d.push_back(0); e0_v.push_back(0); end
    e0_r.push_back(0); e0_t.push_back(1); e0_d.push_back(0); e0_v.push_back(0);
    foreach (sc_vec[i]) repeat (sc_hold[i]) begin
      e0_r.push_back(0); e0_t.push_back(0); e0_d.push_back(0); e0_v.push_back(sc_vec[i]);
    end
    repeat (6) begin e0_r.push_back(0); e0_t.push_back(0); e0_d.push_back(1); e0_v.push_back(0); end
    // expected per-clock trace of generator 1: two passes
    repeat (2) begin
      repeat (2) begin e1_r.push_back(1); e1_t.push_back(0); e1_v.push_back(0); end
      e1_r.push_back(0); e1_t.push_back(1); e1_v.push_back(0);
      foreach (sc_vec[i]) repeat (sc_hold[i]) begin
        e1_r.push_back(0); e1_t.push_back(0); e1_v.push_back(sc_vec[i]);
      end
    end
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < e0_r.size(); k++)
      expect_clk(e0_r[k][0], e0_t[k][0], e0_d[k][0], e0_v[k],
                 (k < e1_r.size()) ? e1_r[k][0] : 1'b0,
                 (k < e1_t.size()) ? e1_t[k][0] : 1'b0,
                 (k < e1_v.size()) ? e1_v[k] : 0);
    checks++;
    if (clkout0 !== clk) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
