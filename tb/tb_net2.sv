// tb_net2: directed test of the filling subnet.
// Checks start on t1, independent completion of the two branches,
// preemption on t5 (valves closed, marking kept, sensors ignored),
// resumption on t6 with history, tfin with priority of t5 over it,
// return to the initial marking after tfin, and a restart.
`timescale 1ns/1ps
module tb_net2;

  logic clk = 0, reset;
  logic x1, x3, t1, t5, t6;
  logic y1, y2, tfin;
  int   checks = 0, failures = 0, stepno = 0;

  always #5 clk = ~clk;

  net2 dut (.*);

  // in: x1 x3 t1 t5 t6 ; tf: tfin before the clock ; out: y1 y2 after it
  task automatic step(input logic [4:0] in, input logic tf, input logic [1:0] out);
    {x1, x3, t1, t5, t6} = in;
    #1;
    checks++;
    if (tfin !== tf) begin
      failures++;
      $display("step %0d: tfin %b expected %b", stepno, tfin, tf);
    end
    @(negedge clk);
    checks++;
    if ({y1, y2} !== out) begin
      failures++;
      $display("step %0d: y1y2 %b expected %b", stepno, {y1, y2}, out);
    end
    stepno++;
  endtask

  initial begin
    {x1, x3, t1, t5, t6} = '0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    step(5'b00000, 0, 2'b00);  // idle
    step(5'b11000, 0, 2'b00);  // sensors while idle: nothing
    step(5'b00100, 0, 2'b11);  // Tinit on t1
    step(5'b10000, 0, 2'b01);  // x1: tank A full
    step(5'b00010, 0, 2'b00);  // t5: preempted, y2 closed
    step(5'b01000, 0, 2'b00);  // x3 ignored while preempted
    step(5'b00001, 0, 2'b01);  // t6: tank B filling resumes (history)
    step(5'b01000, 0, 2'b00);  // x3: tank B full
    step(5'b00010, 0, 2'b00);  // t5 with both done: no tfin, preempted
    step(5'b00001, 0, 2'b00);  // t6: resumed
    step(5'b00000, 1, 2'b00);  // tfin
    step(5'b00000, 0, 2'b00);  // back to idle
    step(5'b00100, 0, 2'b11);  // restart on t1
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
