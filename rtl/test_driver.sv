// test_driver: stimulus generator for in-circuit verification of the
// logic controller.
//
// It stands in for the process plant and operator panel: after its own
// reset it holds the controller in reset for RESET_CYCLES clocks
// (resetout), raises trigger for one clock to start a logic analyser, and
// then plays a fixed scenario of input vectors from an internal table,
// each vector held for its own number of clocks.  Both the controller's
// inputs (stim) and its outputs can then be captured on the analyser.
//
// The scenario has two runs of the process:
//   run 1  start, filling, a defect during filling (noncritical exception)
//          and resumption, emptying of the tanks (where contexts A and B
//          differ), a defect during mixing (ignored), then a failure
//          (critical exception), emergency emptying and resumption;
//   run 2  a complete normal cycle: filling, emptying, mixing with the
//          mixer cycled once through its delay state, reactor draining.
// The order of events in run 1 is that of the documented in-circuit test,
// and the input bus values 000, 030, 034, 03C, 01C, 105 and 005 all occur
// in it in that order; the hold times and run 2 are this design's own.
// With LOOP set the scenario restarts (with a new reset pulse) when it
// ends; otherwise the last vector (all inputs low) is held and done stays
// high.  clkout forwards the clock to the analyser.
//
// Timing: everything is registered on the rising edge of clk; rst is a
// synchronous active-high reset of the generator itself.
module test_driver
  import lc_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 4,
  parameter bit          LOOP         = 1'b0
) (
  input  logic   clk,
  input  logic   rst,
  output logic   clkout,
  output logic   resetout,
  output logic   trigger,
  output lc_in_t stim,
  output logic   done
);

  localparam int unsigned NSTEPS = 32;
  localparam int unsigned RW     = (RESET_CYCLES > 1) ? $clog2(RESET_CYCLES + 1) : 1;

  typedef struct packed {
    logic [9:0] vec;    // lc_in_t bit pattern
    logic [3:0] hold;   // clocks the vector is held (1..15)
  } step_t;

  // Scenario table.  Bits: failure 200, defect 100, start 080,
  // resumption 040, x1 020, x2 010, x3 008, x4 004, x5 002, x6 001.
  function automatic step_t scenario(input logic [4:0] idx);
    case (idx)
      // run 1: exceptions
      5'd0 : return '{10'h000, 4'd3};  // idle, controller initialises
      5'd1 : return '{10'h080, 4'd1};  // start
      5'd2 : return '{10'h000, 4'd2};  // filling A and B
      5'd3 : return '{10'h010, 4'd2};  // x2: tank A bottom covered
      5'd4 : return '{10'h030, 4'd3};  // x1: tank A full
      5'd5 : return '{10'h130, 4'd1};  // defect: filling frozen, alarm
      5'd6 : return '{10'h030, 4'd2};
      5'd7 : return '{10'h034, 4'd2};  // x4: tank B bottom covered
      5'd8 : return '{10'h074, 4'd1};  // resumption: filling B resumes
      5'd9 : return '{10'h034, 4'd2};
      5'd10: return '{10'h03C, 4'd3};  // x3: tank B full -> emptying
      5'd11: return '{10'h01C, 4'd2};  // x1 clears
      5'd12: return '{10'h00C, 4'd2};  // x2 clears: tank A empty
      5'd13: return '{10'h00D, 4'd2};  // x6: reactor bottom -> mixing
      5'd14: return '{10'h005, 4'd2};  // x3 clears
      5'd15: return '{10'h105, 4'd2};  // defect while mixing: no effect
      5'd16: return '{10'h005, 4'd1};
      5'd17: return '{10'h205, 4'd1};  // failure: emergency emptying
      5'd18: return '{10'h005, 4'd2};
      5'd19: return '{10'h004, 4'd2};  // x6 clears: failure alarm
      5'd20: return '{10'h044, 4'd1};  // resumption: back to waiting
      5'd21: return '{10'h000, 4'd3};
      // run 2: normal cycle
      5'd22: return '{10'h080, 4'd1};  // start
      5'd23: return '{10'h014, 4'd2};  // x2, x4
      5'd24: return '{10'h03C, 4'd3};  // x1, x3: both full -> emptying
      5'd25: return '{10'h014, 4'd2};  // x1, x3 clear
      5'd26: return '{10'h015, 4'd2};  // x6: mixing
      5'd27: return '{10'h017, 4'd2};  // x5: mixer delay
      5'd28: return '{10'h015, 4'd2};  // x5 clears: mixing again
      5'd29: return '{10'h005, 4'd2};  // x2 clears
      5'd30: return '{10'h001, 4'd2};  // x4 clears: reactor draining
      default: return '{10'h000, 4'd3}; // x6 clears: waiting
    endcase
  endfunction

  typedef enum logic [1:0] {S_RESET, S_TRIG, S_PLAY, S_DONE} phase_e;

  phase_e        phase;
  logic [RW-1:0] rcnt;
  logic [4:0]    idx;
  logic [3:0]    hcnt;
  step_t         cur;

  always_comb cur = scenario(idx);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= S_RESET;
      rcnt  <= '0;
      idx   <= '0;
      hcnt  <= '0;
    end else begin
      unique case (phase)
        S_RESET: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == RW'(RESET_CYCLES - 1)) phase <= S_TRIG;
        end
        S_TRIG: begin
          phase <= S_PLAY;
          idx   <= '0;
          hcnt  <= '0;
        end
        S_PLAY: begin
          if (hcnt == cur.hold - 4'd1) begin
            hcnt <= '0;
            if (idx == 5'(NSTEPS - 1)) begin
              phase <= LOOP ? S_RESET : S_DONE;
              rcnt  <= '0;
              idx   <= '0;
            end else begin
              idx <= idx + 5'd1;
            end
          end else begin
            hcnt <= hcnt + 4'd1;
          end
        end
        default: ;  // S_DONE: hold
      endcase
    end
  end

  assign clkout   = clk;
  assign resetout = (phase == S_RESET);
  assign trigger  = (phase == S_TRIG);
  assign done     = (phase == S_DONE);
  assign stim     = (phase == S_PLAY) ? lc_in_t'(cur.vec) : '0;

endmodule
