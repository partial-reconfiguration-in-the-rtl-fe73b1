// rp_u3_model: behavioural model of the reconfigurable partition U3 for
// simulation of a run-time context switch.  Not synthesizable as a whole
// in the sense of the real device: on an FPGA the partition's contents are
// replaced by loading a partial bitstream, which no RTL can express.
//
// Both reconfigurable modules are instantiated; `loaded` says which one the
// partition currently holds.  reconfigure(ctx, n) models a partial
// reconfiguration lasting n clocks: meanwhile the partition is decoupled
// (all outputs low, module held in reset), and afterwards the new module
// starts from its initial marking.  The static logic around the partition
// keeps running throughout.
module rp_u3_model
  import lc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       x2, x4, x5, x6,
  input  logic       t2, t3, t7,
  output logic       tfin,
  output logic       y3, y4, y5,
  output logic [1:0] code,
  output logic       busy
);

  net3_ctx_e loaded = CTX_A;
  logic      rm_reset = 1'b0;
  logic      tfin_a, y3_a, y4_a, y5_a, tfin_b, y3_b, y4_b, y5_b;
  logic [1:0] code_a, code_b;

  initial busy = 1'b0;

  net3a u_a (.clk, .reset(reset | rm_reset | loaded != CTX_A), .x2, .x4, .x5, .x6, .t2, .t3, .t7,
             .tfin(tfin_a), .y3(y3_a), .y4(y4_a), .y5(y5_a), .code(code_a));
  net3b u_b (.clk, .reset(reset | rm_reset | loaded != CTX_B), .x2, .x4, .x5, .x6, .t2, .t3, .t7,
             .tfin(tfin_b), .y3(y3_b), .y4(y4_b), .y5(y5_b), .code(code_b));

  always_comb begin
    if (busy) {tfin, y3, y4, y5, code} = '0;
    else if (loaded == CTX_A) {tfin, y3, y4, y5, code} = {tfin_a, y3_a, y4_a, y5_a, code_a};
    else {tfin, y3, y4, y5, code} = {tfin_b, y3_b, y4_b, y5_b, code_b};
  end

  task automatic reconfigure(input net3_ctx_e ctx, input int nclk);
    busy     = 1'b1;
    rm_reset = 1'b1;
    repeat (nclk) @(posedge clk);
    loaded = ctx;
    @(posedge clk);          // one clock of reset for the new module
    #1;
    rm_reset = 1'b0;
    busy     = 1'b0;
  endtask

endmodule
