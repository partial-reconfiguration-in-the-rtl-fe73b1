// net3a: Subnet 3, context A -- refinement of macroplace mp3 (composite
// state CS3) with tanks A and B emptied in parallel.
//
// Three concurrent branches started together by Tinit on t2 (T2 of Net1):
//   p10 (empty tank A, y3) -T12 on !x2-> p11
//   p12 (empty tank B, y4) -T13 on !x4-> p13
//   p14 (wait) -T14 on x6-> p15 (mix, y5) -T15 on x5-> p16 (delay)
//                                          <-T16 on !x5-
// plus p17, a final place with no input that keeps Tfin from ever firing:
// the mixing branch has no end, and the state-machine view leaves CS3 only
// through an outgoing transition of the composite state (T3 of Net1).
//
// This subnet carries the critical exception: Tw fires on t7 | t3 (failure,
// or CS3 left normally), removes the tokens of p10..p17 and returns the
// control token to Pinit, so the net restarts from its initial marking the
// next time mp3 is entered.  Ti and Ta are tied false (no history).
//
// code[1:0] = 2'b01 identifies this reconfigurable module to the outside.
// Its ports are identical to net3b's so either can sit in the same
// reconfigurable partition.  Places are flip-flops with synchronous,
// active-high reset; Tfin is combinational.
module net3a
  import lc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       x2,
  input  logic       x4,
  input  logic       x5,
  input  logic       x6,
  input  logic       t2,
  input  logic       t3,
  input  logic       t7,
  output logic       tfin,
  output logic       y3,
  output logic       y4,
  output logic       y5,
  output logic [1:0] code
);

  logic p_init, p_a, p_i;
  logic t_init, t_i, t_a, t_w, t_fin, local_en;
  logic p10, p11, p12, p13, p14, p15, p16, p17;
  logic T12, T13, T14, T15, T16;

  hcfgpn_ctrl u_ctrl (
    .clk, .reset,
    .init_cond (t2),
    .i_cond    (1'b0),
    .a_cond    (1'b0),
    .w_cond    (t7 | t3),
    .fin_ready (p11 & p13 & p17),
    .p_init, .p_a, .p_i,
    .t_init, .t_i, .t_a, .t_w, .t_fin, .local_en
  );

  always_comb begin
    T12 = p10 & ~x2 & local_en;
    T13 = p12 & ~x4 & local_en;
    T14 = p14 &  x6 & local_en;
    T15 = p15 &  x5 & local_en;
    T16 = p16 & ~x5 & local_en;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      {p10, p11, p12, p13, p14, p15, p16, p17} <= '0;
    end else begin
      p10 <= ~t_w & ((p10 & ~T12)   | t_init);
      p11 <= ~t_w & ((p11 & ~t_fin) | T12);
      p12 <= ~t_w & ((p12 & ~T13)   | t_init);
      p13 <= ~t_w & ((p13 & ~t_fin) | T13);
      p14 <= ~t_w & ((p14 & ~T14)   | t_init);
      p15 <= ~t_w & ((p15 & ~T15)   | T14 | T16);
      p16 <= ~t_w & ((p16 & ~T16)   | T15);
      p17 <= ~t_w &  (p17 & ~t_fin);
    end
  end

  always_comb begin
    y3   = p10 & p_a;
    y4   = p12 & p_a;
    y5   = p15 & p_a;
    tfin = t_fin;
    code = CODE_CTX_A;
  end

  a_mix_branch: assert property (@(posedge clk) disable iff (reset || !p_a)
                                 $onehot({p14, p15, p16}))
    else $error("net3a: mixing branch marking broken");

endmodule
