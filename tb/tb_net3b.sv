// tb_net3b: directed test of the emptying/mixing subnet, context B.
// Checks the context code, start on t2, emptying of the tanks, the mixer
// loop through its delay place, that tfin never fires, the kill on t7
// and on t3 (all valves closed and initial marking back), and a restart.
`timescale 1ns/1ps
module tb_net3b;

  logic clk = 0, reset;
  logic x2, x4, x5, x6, t2, t3, t7;
  logic tfin, y3, y4, y5;
  logic [1:0] code;
  int   checks = 0, failures = 0, stepno = 0;

  always #5 clk = ~clk;

  net3b dut (.*);

  // in: x2 x4 x5 x6 t2 t3 t7 ; out: y3 y4 y5 after the clock
  task automatic step(input logic [6:0] in, input logic [2:0] out);
    {x2, x4, x5, x6, t2, t3, t7} = in;
    #1;
    checks++;
    if (tfin !== 1'b0) begin
      failures++;
      $display("step %0d: tfin fired", stepno);
    end
    @(negedge clk);
    checks++;
    if ({y3, y4, y5} !== out) begin
      failures++;
      $display("step %0d: y3y4y5 %b expected %b", stepno, {y3, y4, y5}, out);
    end
    stepno++;
  endtask

  initial begin
    {x2, x4, x5, x6, t2, t3, t7} = '0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    checks++;
    if (code !== 2'b10) begin failures++; $display("wrong context code %b", code); end
    step(7'b1100_000, 3'b000);  // idle
    step(7'b1100_100, 3'b100);  // t2: tank A emptying first
    step(7'b1101_000, 3'b101);  // x6: mixing
    step(7'b1111_000, 3'b100);  // x5: delay
    step(7'b1101_000, 3'b101);  // !x5: mixing again
    step(7'b1001_000, 3'b101);  // !x4 early: tank B not yet being emptied
    step(7'b0101_000, 3'b011);  // !x2: tank A empty, tank B next
    step(7'b0001_000, 3'b001);  // !x4: tank B empty
    step(7'b0001_000, 3'b001);  // p13 marked, p17 never: no tfin
    step(7'b0001_001, 3'b000);  // t7: killed
    step(7'b1100_100, 3'b100);  // t2: restart from the initial marking
    step(7'b0100_000, 3'b010);  // !x2: tank B
    step(7'b0101_010, 3'b000);  // t3: killed
    step(7'b1101_000, 3'b000);  // stays idle
    step(7'b1100_100, 3'b100);  // restart
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
