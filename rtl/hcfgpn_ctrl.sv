// hcfgpn_ctrl: control part of one subnet of a hierarchical configurable
// Petri net (HCfgPN).
//
// Every subnet of the controller carries three control places besides its
// own places: Pinit (subnet idle, marked at reset), Pa (subnet active) and
// Pi (subnet preempted, history kept).  Five control transitions move the
// single control token between them:
//   Tinit = Pinit & init_cond          start the subnet (supernet entered the macroplace)
//   Tw    = Pa & w_cond                critical exception: kill all places, back to Pinit
//   Ti    = Pa & i_cond & ~Tw          noncritical exception: freeze, token to Pi
//   Ta    = Pi & a_cond                resumption: token back to Pa, places untouched
//   Tfin  = Pa & fin_ready & ~(Ti|Tw)  all final places marked: subnet finished
// local_en (Pa and no exception firing) enables the subnet's own transitions,
// so exceptions always win over ordinary transitions.  Tw and Tfin return the
// token to Pinit, so the subnet can be started again.
//
// Each place is one flip-flop updated as (P & ~outgoing) | incoming on the
// rising clock edge with a synchronous, active-high reset; transitions are
// combinational and visible in the same cycle they fire.  This follows the
// places-oriented Verilog style of the controller description.  Ti and Tw
// are mutually exclusive by construction, so the blocking term is written
// ~(Ti | Tw), which states the intended priority directly.
module hcfgpn_ctrl (
  input  logic clk,
  input  logic reset,
  input  logic init_cond,   // firing condition of Tinit (from the supernet)
  input  logic i_cond,      // preemption condition of Ti
  input  logic a_cond,      // resumption condition of Ta
  input  logic w_cond,      // kill condition of Tw
  input  logic fin_ready,   // all final places of the subnet are marked
  output logic p_init,
  output logic p_a,
  output logic p_i,
  output logic t_init,
  output logic t_i,
  output logic t_a,
  output logic t_w,
  output logic t_fin,
  output logic local_en     // subnet active and no exception firing
);

  always_comb begin
    t_init   = p_init & init_cond;
    t_w      = p_a & w_cond;
    t_i      = p_a & i_cond & ~t_w;
    t_a      = p_i & a_cond;
    t_fin    = p_a & fin_ready & ~(t_i | t_w);
    local_en = p_a & ~(t_i | t_w);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      p_init <= 1'b1;
      p_a    <= 1'b0;
      p_i    <= 1'b0;
    end else begin
      p_init <= (p_init & ~t_init) | t_w | t_fin;
      p_a    <= (p_a & ~(t_i | t_w | t_fin)) | t_init | t_a;
      p_i    <= (p_i & ~t_a) | t_i;
    end
  end

  // The control token is never duplicated nor lost.
  a_one_token: assert property (@(posedge clk) disable iff (reset)
                                $onehot({p_init, p_a, p_i}))
    else $error("hcfgpn_ctrl: control places not one-hot");

endmodule
