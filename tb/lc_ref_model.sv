// lc_ref_model: reference model of the mixing-process controller, written
// from its state-machine (statechart) description rather than from the
// Petri nets, for use by testbenches only.
//
// Top states: INIT (one clock after reset), WAITING, CS2 (filling, two
// regions with history), DEFECT_ALARM, CS3 (emptying + mixing),
// REACTOR_EMPTYING, EMERGENCY_EMPTYING, FAILURE_ALARM.  CS3's emptying is
// two parallel regions (context A) or one sequential region (context B).
// Each clock the current state and inputs give the next state; outputs
// are functions of the state.  Exceptions take priority over the other
// transitions of the state they leave.
module lc_ref_model
  import lc_pkg::*;
#(
  parameter net3_ctx_e CONTEXT = CTX_A
) (
  input  logic    clk,
  input  logic    reset,
  input  lc_in_t  pin,
  output lc_out_t pout,
  output int      top_state
);

  typedef enum int {INIT, WAITING, CS2, DEFECT_ALARM, CS3, REACTOR_EMPTYING,
                    EMERGENCY_EMPTYING, FAILURE_ALARM} top_e;
  typedef enum int {E_A, E_B, E_DONE} empty_e;   // context B region
  typedef enum int {M_WAIT, M_MIX, M_DELAY} mix_e;

  top_e   st;
  bit     fill_a, fill_b;      // CS2 regions: 1 = still filling
  bit     emp_a, emp_b;        // CS3 context A regions: 1 = still emptying
  empty_e emp_seq;             // CS3 context B region
  mix_e   mix;

  always @(posedge clk) begin
    if (reset) begin
      st <= INIT;
    end else begin
      case (st)
        INIT:    st <= WAITING;
        WAITING: if (pin.start) begin
                   st <= CS2; fill_a <= 1; fill_b <= 1;
                 end
        CS2: begin
          if (pin.defect) st <= DEFECT_ALARM;
          else if (!fill_a && !fill_b) begin
            st <= CS3; emp_a <= 1; emp_b <= 1; emp_seq <= E_A; mix <= M_WAIT;
          end else begin
            if (fill_a && pin.x1) fill_a <= 0;
            if (fill_b && pin.x3) fill_b <= 0;
          end
        end
        DEFECT_ALARM: if (pin.resumption) st <= CS2;   // history kept
        CS3: begin
          if (pin.failure) st <= EMERGENCY_EMPTYING;
          else if (!(pin.x2 || pin.x4)) st <= REACTOR_EMPTYING;
          else begin
            if (emp_a && !pin.x2) emp_a <= 0;
            if (emp_b && !pin.x4) emp_b <= 0;
            if (emp_seq == E_A && !pin.x2) emp_seq <= E_B;
            if (emp_seq == E_B && !pin.x4) emp_seq <= E_DONE;
            case (mix)
              M_WAIT:  if (pin.x6)  mix <= M_MIX;
              M_MIX:   if (pin.x5)  mix <= M_DELAY;
              default: if (!pin.x5) mix <= M_MIX;
            endcase
          end
        end
        REACTOR_EMPTYING:   if (!pin.x6) st <= WAITING;
        EMERGENCY_EMPTYING: if (!pin.x6) st <= FAILURE_ALARM;
        default:            if (pin.resumption) st <= WAITING;
      endcase
    end
  end

  always_comb begin
    pout       = '0;
    pout.code0 = (CONTEXT == CTX_A);
    pout.code1 = (CONTEXT == CTX_B);
    pout.alarm = (st == DEFECT_ALARM) || (st == EMERGENCY_EMPTYING) || (st == FAILURE_ALARM);
    pout.ev1   = (st == EMERGENCY_EMPTYING);
    pout.y1    = (st == CS2) && fill_a;
    pout.y2    = (st == CS2) && fill_b;
    pout.y3    = (st == CS3) && ((CONTEXT == CTX_A) ? emp_a : (emp_seq == E_A));
    pout.y4    = (st == CS3) && ((CONTEXT == CTX_A) ? emp_b : (emp_seq == E_B));
    pout.y5    = (st == CS3) && (mix == M_MIX);
    pout.y6    = (st == REACTOR_EMPTYING);
    top_state  = int'(st);
  end

endmodule
