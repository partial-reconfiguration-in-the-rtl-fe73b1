// tb_rlc_top: random-stimulus test of the logic controller in both
// contexts against the statechart reference model.
//
// Two controllers (Net3 partition holding context A and context B) and two
// reference models see the same random inputs: sensors toggle now and then,
// start/resumption are frequent, defect and failure rare, and reset is
// pulsed occasionally.  Every clock, each controller's whole output bus must
// equal its model's.  Every top state of the model must be reached in both
// contexts, and context A must show both tanks emptying at once while
// context B never does.
`timescale 1ns/1ps
module tb_rlc_top;
  import lc_pkg::*;

  localparam int NCYC = 40000;
  localparam int NTOP = 8;

  logic    clk = 0;
  logic    reset;
  lc_in_t  pin;
  lc_out_t out_a, out_b, ref_a, ref_b;
  int      st_a, st_b;
  int      checks = 0, failures = 0;
  int      seen_a[NTOP], seen_b[NTOP];
  int      par_a = 0, par_b = 0;

  always #5 clk = ~clk;

  rlc_top #(.CONTEXT(CTX_A)) dut_a (.clk, .reset, .pin, .pout(out_a));
  rlc_top #(.CONTEXT(CTX_B)) dut_b (.clk, .reset, .pin, .pout(out_b));
  lc_ref_model #(.CONTEXT(CTX_A)) ref_ma (.clk, .reset, .pin, .pout(ref_a), .top_state(st_a));
  lc_ref_model #(.CONTEXT(CTX_B)) ref_mb (.clk, .reset, .pin, .pout(ref_b), .top_state(st_b));

  function automatic bit chance(int unsigned n);  // probability 1/n
    return ($urandom % n) == 0;
  endfunction

  initial begin
    for (int i = 0; i < NTOP; i++) begin seen_a[i] = 0; seen_b[i] = 0; end
    pin   = '0;
    reset = 1;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      begin
        checks++;
        if (out_a !== ref_a) begin
          failures++;
          if (failures < 10) $display("cycle %0d ctx A: got %h expected %h (in %h)", c, out_a, ref_a, pin);
        end
        checks++;
        if (out_b !== ref_b) begin
          failures++;
          if (failures < 10) $display("cycle %0d ctx B: got %h expected %h (in %h)", c, out_b, ref_b, pin);
        end
        seen_a[st_a]++;
        seen_b[st_b]++;
        if (out_a.y3 && out_a.y4) par_a++;
        if (out_b.y3 && out_b.y4) par_b++;
      end
      // new inputs
      reset          = chance(2000);
      pin.start      = chance(4);
      pin.resumption = chance(6);
      pin.defect     = chance(12);
      pin.failure    = chance(40);
      if (chance(6)) pin.x1 = ~pin.x1;
      if (chance(6)) pin.x2 = ~pin.x2;
      if (chance(6)) pin.x3 = ~pin.x3;
      if (chance(6)) pin.x4 = ~pin.x4;
      if (chance(3)) pin.x5 = ~pin.x5;
      if (chance(6)) pin.x6 = ~pin.x6;
    end
    for (int i = 0; i < NTOP; i++) begin
      checks += 2;
      if (seen_a[i] == 0) begin failures++; $display("ctx A: top state %0d never reached", i); end
      if (seen_b[i] == 0) begin failures++; $display("ctx B: top state %0d never reached", i); end
    end
    checks += 2;
    if (par_a == 0) begin failures++; $display("ctx A: tanks never emptied in parallel"); end
    if (par_b != 0) begin failures++; $display("ctx B: tanks emptied in parallel"); end
    $display("states A: %p", seen_a);
    $display("states B: %p", seen_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
