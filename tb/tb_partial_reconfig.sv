// tb_partial_reconfig: run-time context switch of the Net3 partition while
// the static subnets keep working.
//
// Net1 and Net2 are wired as in the controller; the partition is the
// behavioural model rp_u3_model.  A first process cycle runs with context A
// (parallel emptying).  During the next filling phase the partition is
// reconfigured to context B; filling, a defect and its resumption are
// handled meanwhile.  The following emptying must then be sequential and
// the partition must report context B's code.
`timescale 1ns/1ps
module tb_partial_reconfig;
  import lc_pkg::*;

  logic   clk = 0, reset;
  lc_in_t pin;
  logic   t1, t2, t3, t5, t6, t7, tfin2, tfin3, busy;
  logic   y1, y2, y3, y4, y5, y6, alarm, ev1;
  logic [1:0] code;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  net1 u1 (.clk, .reset, .start(pin.start), .defect(pin.defect), .failure(pin.failure),
           .resumption(pin.resumption), .x2(pin.x2), .x4(pin.x4), .x6(pin.x6), .tfin2, .tfin3,
           .T1(t1), .T2(t2), .T3(t3), .T5(t5), .T6(t6), .T7(t7), .y6, .alarm, .ev1);
  net2 u2 (.clk, .reset, .x1(pin.x1), .x3(pin.x3), .t1, .t5, .t6, .y1, .y2, .tfin(tfin2));
  rp_u3_model u3 (.clk, .reset, .x2(pin.x2), .x4(pin.x4), .x5(pin.x5), .x6(pin.x6),
                  .t2, .t3, .t7, .tfin(tfin3), .y3, .y4, .y5, .code, .busy);

  // apply inputs for one clock, then compare {code, alarm, y1..y6}
  task automatic step(input logic [9:0] in, input logic [8:0] expect_out, input string what);
    pin = lc_in_t'(in);
    @(negedge clk);
    checks++;
    if ({code, alarm, y1, y2, y3, y4, y5, y6} !== expect_out) begin
      failures++;
      $display("%s: got %b expected %b", what, {code, alarm, y1, y2, y3, y4, y5, y6}, expect_out);
    end
  endtask

  initial begin
    pin   = '0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    //                 inputs    code al y1..y6
    step(10'h000, 9'b01_0_000000, "idle A");
    step(10'h080, 9'b01_0_110000, "start");
    step(10'h03C, 9'b01_0_000000, "tanks full");
    step(10'h01D, 9'b01_0_001100, "context A: parallel emptying");
    step(10'h001, 9'b01_0_000001, "draining");
    step(10'h000, 9'b01_0_000000, "waiting");
    step(10'h080, 9'b01_0_110000, "second start");
    fork
      u3.reconfigure(CTX_B, 8);
      begin
        step(10'h030, 9'b00_0_010000, "filling during reconfiguration");
        step(10'h130, 9'b00_1_000000, "defect during reconfiguration");
        step(10'h030, 9'b00_1_000000, "defect alarm");
        step(10'h070, 9'b00_0_010000, "resumed with history");
      end
    join
    checks++;
    if (busy !== 1'b0) failures++;
    step(10'h030, 9'b10_0_010000, "context B loaded");
    step(10'h03C, 9'b10_0_000000, "tanks full");
    step(10'h01D, 9'b10_0_001000, "context B: tank A first");
    step(10'h00D, 9'b10_0_000110, "context B: then tank B, mixing");
    step(10'h001, 9'b10_0_000001, "draining");
    step(10'h000, 9'b10_0_000000, "waiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
