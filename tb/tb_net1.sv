// tb_net1: directed test of the top-level net.
// Each step sets the inputs, checks the firing outputs (T1 T2 T3 T5 T6 T7)
// before the clock and the place outputs (y6 alarm ev1) after it.  The
// steps cover start, a defect winning over tfin2, resumption, entry to
// mp3, failure winning over the sensor exit, emergency emptying, failure
// alarm and its resumption, then a normal cycle through reactor draining.
`timescale 1ns/1ps
module tb_net1;

  logic clk = 0, reset;
  logic start, defect, failure, resumption, x2, x4, x6, tfin2, tfin3;
  logic T1, T2, T3, T5, T6, T7, y6, alarm, ev1;
  int   checks = 0, failures = 0, stepno = 0;

  always #5 clk = ~clk;

  net1 dut (.*);

  // in: start defect failure resumption x2 x4 x6 tfin2
  // fire: T1 T2 T3 T5 T6 T7 ; out: y6 alarm ev1 (after the clock)
  task automatic step(input logic [7:0] in, input logic [5:0] fire, input logic [2:0] out);
    {start, defect, failure, resumption, x2, x4, x6, tfin2} = in;
    #1;
    checks++;
    if ({T1, T2, T3, T5, T6, T7} !== fire) begin
      failures++;
      $display("step %0d: fired %b expected %b", stepno, {T1, T2, T3, T5, T6, T7}, fire);
    end
    @(negedge clk);
    checks++;
    if ({y6, alarm, ev1} !== out) begin
      failures++;
      $display("step %0d: outputs %b expected %b", stepno, {y6, alarm, ev1}, out);
    end
    stepno++;
  endtask

  initial begin
    {start, defect, failure, resumption, x2, x4, x6, tfin2} = '0;
    tfin3 = 0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    step(8'b0000_1100, 6'b000000, 3'b000);  // Tinit: p1 marked
    step(8'b0100_1100, 6'b000000, 3'b000);  // defect in p1: nothing
    step(8'b1000_1100, 6'b100000, 3'b000);  // T1 -> mp2
    step(8'b0100_1101, 6'b000100, 3'b010);  // T5 beats T2 -> p3 alarm
    step(8'b0000_1101, 6'b000000, 3'b010);  // waiting for resumption
    step(8'b0001_1100, 6'b000010, 3'b000);  // T6 -> mp2
    step(8'b0000_1101, 6'b010000, 3'b000);  // T2 -> mp3
    step(8'b0000_1000, 6'b000000, 3'b000);  // x2 still high: stay
    step(8'b0010_0001, 6'b000001, 3'b011);  // T7 beats T3 -> p4 alarm ev1
    step(8'b0000_0010, 6'b000000, 3'b011);  // x6 high: keep emptying
    step(8'b0000_0000, 6'b000000, 3'b010);  // T8 -> p5 failure alarm
    step(8'b0001_0000, 6'b000000, 3'b000);  // T9 -> p1 (not a visible T)
    step(8'b1000_0100, 6'b100000, 3'b000);  // T1 -> mp2
    step(8'b0000_0101, 6'b010000, 3'b000);  // T2 -> mp3
    step(8'b0100_0110, 6'b000000, 3'b000);  // defect in mp3: nothing
    step(8'b0000_0010, 6'b001000, 3'b100);  // T3 -> p2 y6
    step(8'b0000_0010, 6'b000000, 3'b100);  // draining
    step(8'b0000_0000, 6'b000000, 3'b000);  // T4 -> p1
    step(8'b1000_0000, 6'b100000, 3'b000);  // start again: T1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
