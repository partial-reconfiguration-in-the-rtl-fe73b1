// dut: in-circuit verification top -- the logic controller (U1, rlc_top)
// driven by the stimulus generator (U2, test_driver).
//
// U2 produces the controller's reset (resetout) and its process inputs
// (stim); U1's outputs and U2's inputs, trigger and forwarded clock are
// brought out to pins for a logic analyser.  The only parameter chooses
// which reconfigurable module fills the controller's Net3 partition:
// CTX_A (parallel emptying of the two tanks, the base context) or CTX_B
// (sequential emptying).  Everything except that partition is static.
//
// Timing: one clock; rst resets the stimulus generator and the controller
// synchronously, and the generator then holds the controller in reset for
// its first clocks (resetout) before the scenario starts.
module dut
  import lc_pkg::*;
#(
  parameter net3_ctx_e CONTEXT = CTX_A
) (
  input  logic    clk,
  input  logic    rst,
  output logic    clkout,
  output logic    resetout,
  output logic    trigger,
  output logic    done,
  output lc_in_t  inputs,
  output lc_out_t outputs
);

  test_driver u2 (
    .clk, .rst,
    .clkout, .resetout, .trigger,
    .stim (inputs),
    .done
  );

  rlc_top #(.CONTEXT(CONTEXT)) u1 (
    .clk,
    .reset (rst | resetout),
    .pin   (inputs),
    .pout  (outputs)
  );

endmodule
