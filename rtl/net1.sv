// net1: Subnet 1, the top-level net of the mixing-process controller.
//
// Places: p1 (waiting for start), mp2 (macroplace of Net2: filling tanks),
// mp3 (macroplace of Net3: emptying tanks and mixing), p2 (reactor
// draining, y6), p3 (defect alarm), p4 (emergency emptying, alarm + ev1),
// p5 (failure alarm).  Transitions:
//   T1 p1 -> mp2 on start           T5 mp2 -> p3 on defect     (noncritical)
//   T2 mp2 -> mp3 on tfin2          T6 p3 -> mp2 on resumption
//   T3 mp3 -> p2 on !(x2+x4)        T7 mp3 -> p4 on failure    (critical)
//   T4 p2 -> p1 on !x6              T8 p4 -> p5 on !x6
//                                   T9 p5 -> p1 on resumption
// The firing signals T1, T2, T3, T5, T6, T7 are outputs: they are the
// conditions of Tinit/Ti/Ta of Net2 and of Tinit/Tw of Net3, which is how a
// macroplace starts, freezes, resumes or kills its subnet.
//
// The top-level net has no exceptions of its own: Ti, Ta, Tw and Tfin of
// its control part are tied false, as in the net drawing.  Its Tinit has no
// printed condition and is taken as always true, so p1 is marked one clock
// after reset.  Where two transitions share an input place the exception
// wins (T5 over T2, T7 over T3).  tfin3, the completion signal of Net3, is
// brought in as the net's interface lists it but drives no transition: T3
// fires on the sensor condition alone, and Net3 cannot finish anyway (its
// final place p17 has no input).  Adding tfin3 to T3 would also close a
// combinational loop, since T3 is one of the kill conditions of Net3 and
// Net3's Tfin is blocked by its own kill.
//
// Outputs are Moore outputs of marked places, gated by Pa.  All places are
// flip-flops with synchronous active-high reset; firing signals are
// combinational from the current marking and inputs.
module net1 (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic defect,
  input  logic failure,
  input  logic resumption,
  input  logic x2,
  input  logic x4,
  input  logic x6,
  input  logic tfin2,
  input  logic tfin3,
  output logic T1,
  output logic T2,
  output logic T3,
  output logic T5,
  output logic T6,
  output logic T7,
  output logic y6,
  output logic alarm,
  output logic ev1
);

  logic p_init, p_a, p_i;
  logic t_init, t_i, t_a, t_w, t_fin, local_en;
  logic p1, mp2, mp3, p2, p3, p4, p5;
  logic T4, T8, T9;

  hcfgpn_ctrl u_ctrl (
    .clk, .reset,
    .init_cond (1'b1),
    .i_cond    (1'b0),
    .a_cond    (1'b0),
    .w_cond    (1'b0),
    .fin_ready (1'b0),
    .p_init, .p_a, .p_i,
    .t_init, .t_i, .t_a, .t_w, .t_fin, .local_en
  );

  always_comb begin
    T1 = p1  & start & local_en;
    T5 = mp2 & defect & local_en;
    T2 = mp2 & tfin2 & ~T5 & local_en;
    T6 = p3  & resumption & local_en;
    T7 = mp3 & failure & local_en;
    T3 = mp3 & ~(x2 | x4) & ~T7 & local_en;
    T4 = p2  & ~x6 & local_en;
    T8 = p4  & ~x6 & local_en;
    T9 = p5  & resumption & local_en;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      {p1, mp2, mp3, p2, p3, p4, p5} <= '0;
    end else begin
      p1  <= ~t_w & ((p1  & ~T1) | t_init | T4 | T9);
      mp2 <= ~t_w & ((mp2 & ~(T2 | T5)) | T1 | T6);
      p3  <= ~t_w & ((p3  & ~T6) | T5);
      mp3 <= ~t_w & ((mp3 & ~(T3 | T7)) | T2);
      p2  <= ~t_w & ((p2  & ~T4) | T3);
      p4  <= ~t_w & ((p4  & ~T8) | T7);
      p5  <= ~t_w & ((p5  & ~T9) | T8);
    end
  end

  always_comb begin
    y6    = p2 & p_a;
    ev1   = p4 & p_a;
    alarm = (p3 | p4 | p5) & p_a;
  end

  // The top-level net is a state machine: once active it holds one token.
  a_one_place: assert property (@(posedge clk) disable iff (reset || !p_a)
                                $onehot({p1, mp2, mp3, p2, p3, p4, p5}))
    else $error("net1: marking is not a single token");

endmodule
