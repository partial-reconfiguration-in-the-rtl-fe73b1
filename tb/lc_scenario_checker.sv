// lc_scenario_checker: watches one in-circuit verification top (stimulus
// generator + controller) and checks it end to end.
//
// Every clock it compares the controller's output bus with the statechart
// reference model fed by the same reset and inputs.  It also counts how
// often each mechanism of the controller happened -- start, noncritical
// preemption of the filling subnet, resumption with history, completion of
// the filling subnet, emptying (parallel in context A, sequential in
// context B), mixing and the mixer's delay loop, a defect ignored while
// mixing, the critical exception with emergency emptying, the failure
// alarm and its resumption, normal reactor draining -- and checks that the
// output-bus values of the documented in-circuit test for this context all
// appear.  final_checks() turns every mechanism that never happened into a
// failure and checks the scenario length from trigger to done.
module lc_scenario_checker
  import lc_pkg::*;
#(
  parameter net3_ctx_e CONTEXT   = CTX_A,
  parameter int        PLAY_LEN  = 63     // clocks of the generator's scenario
) (
  input  logic    clk,
  input  logic    resetout,
  input  logic    trigger,
  input  logic    done,
  input  lc_in_t  inputs,
  input  lc_out_t outputs
);

  localparam int WAITING = 1, CS2 = 2, DEFECT = 3, CS3 = 4, DRAIN = 5,
                 EMERG = 6, FAIL = 7;
  localparam int NMECH = 15;
  localparam int NVAL  = 8;

  lc_out_t ref_out;
  int      st, prev_st;
  lc_out_t prev_out;
  int      checks = 0, failures = 0;
  int      mech[NMECH];
  int      val_seen[NVAL];
  logic [9:0] doc_val[NVAL];
  int      cyc = 0, trig_cyc = -1, done_cyc = -1;
  bit      y2_before_defect = 0, y4_after_y3 = 0;

  lc_ref_model #(.CONTEXT(CONTEXT)) u_ref (
    .clk, .reset(resetout), .pin(inputs), .pout(ref_out), .top_state(st)
  );

  initial begin
    for (int i = 0; i < NMECH; i++) mech[i] = 0;
    for (int i = 0; i < NVAL; i++) val_seen[i] = 0;
    // Output bus values recorded for this context, with the code bits set.
    doc_val = '{10'h000, 10'h030, 10'h010, 10'h080, 10'h00C, 10'h004, 10'h006, 10'h0C0};
    if (CONTEXT == CTX_B) doc_val[4] = 10'h008;  // context B: tank A alone first
    for (int i = 0; i < NVAL; i++)
      doc_val[i] |= (CONTEXT == CTX_A) ? 10'h200 : 10'h100;
    prev_st  = 0;
    prev_out = '0;
  end

  always @(negedge clk) begin
    cyc++;
    if (trigger && trig_cyc < 0) trig_cyc = cyc;
    if (done && done_cyc < 0)    done_cyc = cyc;
    checks++;
    if (outputs !== ref_out) begin
      failures++;
      if (failures < 10)
        $display("ctx %s cycle %0d: outputs %h, expected %h (inputs %h)",
                 CONTEXT.name(), cyc, outputs, ref_out, inputs);
    end
    if (!resetout) begin
      for (int i = 0; i < NVAL; i++) if (outputs == doc_val[i]) val_seen[i]++;
      if (prev_st == WAITING && st == CS2)    mech[0]++;   // start
      if (prev_st == CS2 && st == DEFECT) begin
        mech[1]++;                                          // noncritical preemption
        y2_before_defect = prev_out.y2;
      end
      if (prev_st == DEFECT && st == CS2 && y2_before_defect && outputs.y2)
        mech[2]++;                                          // resumed where it stopped
      if (prev_st == CS2 && st == CS3)        mech[3]++;   // filling subnet finished
      if (outputs.y3 && outputs.y4)           mech[4]++;   // parallel emptying
      if (prev_out.y3 && !outputs.y3 && outputs.y4 && !prev_out.y4)
        y4_after_y3 = 1;
      if (y4_after_y3)                        mech[5]++;   // sequential emptying
      if (outputs.y5)                         mech[6]++;   // mixing
      if (st == CS3 && prev_st == CS3 && prev_out.y5 && !outputs.y5) mech[7]++; // mixer delay
      if (prev_st == CS3 && st == CS3 && inputs.defect) mech[8]++;  // defect ignored in CS3
      if (prev_st == CS3 && st == EMERG)      mech[9]++;   // critical exception
      if (prev_st == EMERG && st == FAIL)     mech[10]++;  // failure alarm
      if (prev_st == FAIL && st == WAITING)   mech[11]++;  // resumption after failure
      if (prev_st == CS3 && st == DRAIN)      mech[12]++;  // normal exit of CS3
      if (prev_st == DRAIN && st == WAITING)  mech[13]++;  // reactor drained
      if (outputs.code0 == (CONTEXT == CTX_A) && outputs.code1 == (CONTEXT == CTX_B))
        mech[14]++;                                         // context code
    end
    prev_st  = st;
    prev_out = outputs;
  end

  task automatic final_checks();
    for (int i = 0; i < NMECH; i++) begin
      // mechanism 4 belongs to context A only, 5 to context B only
      bit expect_seen = !((i == 4 && CONTEXT == CTX_B) || (i == 5 && CONTEXT == CTX_A));
      checks++;
      if ((mech[i] != 0) != expect_seen) begin
        failures++;
        $display("ctx %s: mechanism %0d count %0d, expected %s", CONTEXT.name(), i, mech[i],
                 expect_seen ? "some" : "none");
      end
    end
    for (int i = 0; i < NVAL; i++) begin
      checks++;
      if (val_seen[i] == 0) begin
        failures++;
        $display("ctx %s: output value %h never seen", CONTEXT.name(), doc_val[i]);
      end
    end
    checks++;
    if (trig_cyc < 0 || done_cyc - trig_cyc != PLAY_LEN + 1) begin
      failures++;
      $display("ctx %s: trigger at %0d, done at %0d, expected %0d clocks apart",
               CONTEXT.name(), trig_cyc, done_cyc, PLAY_LEN + 1);
    end
    $display("ctx %s mechanisms: %p", CONTEXT.name(), mech);
  endtask

endmodule
