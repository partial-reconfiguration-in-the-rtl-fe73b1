// net3b: Subnet 3, context B -- refinement of macroplace mp3 (composite
// state CS3) with tanks A and B emptied one after the other.
//
// Two concurrent branches started together by Tinit on t2 (T2 of Net1):
//   p10 (empty tank A, y3) -T12 on !x2-> p12 (empty tank B, y4)
//                          -T13 on !x4-> p13
//   p14 (wait) -T14 on x6-> p15 (mix, y5) -T15 on x5-> p16 (delay)
//                                          <-T16 on !x5-
// plus p17, a final place with no input that keeps Tfin from firing, as in
// context A.  Exception handling is the same as in context A: Tw on
// t7 | t3 kills every place and returns the control token to Pinit; there
// is no preemption with history.
//
// code[1:0] = 2'b10 identifies this reconfigurable module.  The ports are
// those of net3a, so both fit the same reconfigurable partition.  Places are
// flip-flops with synchronous, active-high reset; Tfin is combinational.
module net3b
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
  logic p10, p12, p13, p14, p15, p16, p17;
  logic T12, T13, T14, T15, T16;

  hcfgpn_ctrl u_ctrl (
    .clk, .reset,
    .init_cond (t2),
    .i_cond    (1'b0),
    .a_cond    (1'b0),
    .w_cond    (t7 | t3),
    .fin_ready (p13 & p17),
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
      {p10, p12, p13, p14, p15, p16, p17} <= '0;
    end else begin
      p10 <= ~t_w & ((p10 & ~T12)   | t_init);
      p12 <= ~t_w & ((p12 & ~T13)   | T12);
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
    code = CODE_CTX_B;
  end

  a_empty_branch: assert property (@(posedge clk) disable iff (reset || !p_a)
                                   $onehot({p10, p12, p13}))
    else $error("net3b: emptying branch marking broken");
  a_mix_branch: assert property (@(posedge clk) disable iff (reset || !p_a)
                                 $onehot({p14, p15, p16}))
    else $error("net3b: mixing branch marking broken");

endmodule
