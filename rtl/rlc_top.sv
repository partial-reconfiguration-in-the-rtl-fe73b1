// rlc_top: the reconfigurable logic controller for the two-tank mixing
// process.
//
// Three subnets, one module each, talk only through firing signals:
//   U1 net1  top-level net; its macroplaces mp2/mp3 stand for the two
//            subnets below and it tells them, through T1/T5/T6 and
//            T2/T3/T7, when to start, freeze, resume or be killed;
//   U2 net2  filling (CS2), static, noncritical exception with history;
//   U3 net3  emptying and mixing (CS3), the reconfigurable partition.
// The partition U3 holds one of two reconfigurable modules with identical
// ports: net3a (context A, parallel emptying) or net3b (context B,
// sequential emptying).  On an FPGA the choice is made at run time by
// loading a partial bitstream for U3 only, with U1/U2 kept running; in
// this RTL the parameter CONTEXT selects which module the partition holds,
// which is what each of the two configurations contains.  The loaded
// module reports itself on code0/code1 (context A: code0, context B: code1).
//
// Interface: lc_in_t / lc_out_t buses (see lc_pkg) with one clock and a
// synchronous active-high reset.  All outputs are registered-place
// functions (Moore); an input change is acted on at the next rising edge.
module rlc_top
  import lc_pkg::*;
#(
  parameter net3_ctx_e CONTEXT = CTX_A
) (
  input  logic    clk,
  input  logic    reset,
  input  lc_in_t  pin,
  output lc_out_t pout
);

  logic t1, t2, t3, t5, t6, t7;
  logic tfin2, tfin3;
  logic [1:0] code;

  net1 u1 (
    .clk, .reset,
    .start      (pin.start),
    .defect     (pin.defect),
    .failure    (pin.failure),
    .resumption (pin.resumption),
    .x2         (pin.x2),
    .x4         (pin.x4),
    .x6         (pin.x6),
    .tfin2, .tfin3,
    .T1 (t1), .T2 (t2), .T3 (t3), .T5 (t5), .T6 (t6), .T7 (t7),
    .y6    (pout.y6),
    .alarm (pout.alarm),
    .ev1   (pout.ev1)
  );

  net2 u2 (
    .clk, .reset,
    .x1 (pin.x1),
    .x3 (pin.x3),
    .t1, .t5, .t6,
    .y1   (pout.y1),
    .y2   (pout.y2),
    .tfin (tfin2)
  );

  // Reconfigurable partition U3.
  if (CONTEXT == CTX_A) begin : g_u3
    net3a u3 (
      .clk, .reset,
      .x2 (pin.x2), .x4 (pin.x4), .x5 (pin.x5), .x6 (pin.x6),
      .t2, .t3, .t7,
      .tfin (tfin3),
      .y3 (pout.y3), .y4 (pout.y4), .y5 (pout.y5),
      .code
    );
  end else begin : g_u3
    net3b u3 (
      .clk, .reset,
      .x2 (pin.x2), .x4 (pin.x4), .x5 (pin.x5), .x6 (pin.x6),
      .t2, .t3, .t7,
      .tfin (tfin3),
      .y3 (pout.y3), .y4 (pout.y4), .y5 (pout.y5),
      .code
    );
  end

  assign pout.code0 = code[0];
  assign pout.code1 = code[1];

endmodule
