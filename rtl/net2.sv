// net2: Subnet 2, refinement of macroplace mp2 (composite state CS2,
// filling tanks A and B).
//
// Two concurrent branches: p6 (fill tank A, y1) -T10 on x1-> p7, and
// p8 (fill tank B, y2) -T11 on x3-> p9.  Tinit fires on t1 (T1 of Net1) and
// marks p6 and p8; Tfin fires when p7 and p9 are both marked and tells
// Net1 (tfin) that the macroplace may be left.
//
// This subnet carries the noncritical exception: Ti fires on t5 (defect,
// T5 of Net1) and moves the control token from Pa to Pi without touching
// p6..p9, so every valve closes (outputs are gated by Pa) but the marking
// is kept; Ta fires on t6 (resumption, T6 of Net1) and returns the token to
// Pa, resuming each branch where it stopped (the history pseudostate of the
// state-machine view).  Tw is tied false: this subnet is never killed.
//
// Timing: places are flip-flops with synchronous active-high reset; tfin
// is combinational so Net1 can fire T2 in the same cycle.
module net2 (
  input  logic clk,
  input  logic reset,
  input  logic x1,
  input  logic x3,
  input  logic t1,
  input  logic t5,
  input  logic t6,
  output logic y1,
  output logic y2,
  output logic tfin
);

  logic p_init, p_a, p_i;
  logic t_init, t_i, t_a, t_w, t_fin, local_en;
  logic p6, p7, p8, p9;
  logic T10, T11;

  hcfgpn_ctrl u_ctrl (
    .clk, .reset,
    .init_cond (t1),
    .i_cond    (t5),
    .a_cond    (t6),
    .w_cond    (1'b0),
    .fin_ready (p7 & p9),
    .p_init, .p_a, .p_i,
    .t_init, .t_i, .t_a, .t_w, .t_fin, .local_en
  );

  always_comb begin
    T10 = p6 & x1 & local_en;
    T11 = p8 & x3 & local_en;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      {p6, p7, p8, p9} <= '0;
    end else begin
      p6 <= ~t_w & ((p6 & ~T10)   | t_init);
      p7 <= ~t_w & ((p7 & ~t_fin) | T10);
      p8 <= ~t_w & ((p8 & ~T11)   | t_init);
      p9 <= ~t_w & ((p9 & ~t_fin) | T11);
    end
  end

  always_comb begin
    y1   = p6 & p_a;
    y2   = p8 & p_a;
    tfin = t_fin;
  end

  // Each branch holds exactly one token while the subnet is started.
  a_branch_a: assert property (@(posedge clk) disable iff (reset || p_init)
                               $onehot({p6, p7}))
    else $error("net2: branch A marking broken");
  a_branch_b: assert property (@(posedge clk) disable iff (reset || p_init)
                               $onehot({p8, p9}))
    else $error("net2: branch B marking broken");

endmodule
