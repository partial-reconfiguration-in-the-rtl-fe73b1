// lc_pkg: types shared by the logic controller of the two-tank mixing process.
//
// The controller reads four operator/exception signals and six level sensors
// and drives six valves/motors, an alarm lamp and an emergency valve.  The
// packed structs below fix the bit order of those buses: it is the order in
// which the in-circuit verification lists its "inputs" and "outputs" buses,
// most significant bit first, so a bus value such as 10'h034 (x1, x2 and x4
// set) reads the same here as on a logic analyser.  The context enum
// names the two reconfigurable modules of the Net3 partition.
package lc_pkg;

  // Process inputs, MSB first: failure, defect, start, resumption, x1..x6.
  // x1/x2: tank A upper/lower level, x3/x4: tank B upper/lower level,
  // x5/x6: reactor upper/lower level.
  typedef struct packed {
    logic failure;
    logic defect;
    logic start;
    logic resumption;
    logic x1;
    logic x2;
    logic x3;
    logic x4;
    logic x5;
    logic x6;
  } lc_in_t;

  // Controller outputs, MSB first: code0, code1, alarm, ev1, y1..y6.
  // code0/code1 identify the loaded Net3 context; y1/y2 fill tanks A/B,
  // y3/y4 empty tanks A/B into the reactor, y5 runs the mixer, y6 drains
  // the reactor, ev1 is the emergency valve, alarm the flashing lamp.
  typedef struct packed {
    logic code0;
    logic code1;
    logic alarm;
    logic ev1;
    logic y1;
    logic y2;
    logic y3;
    logic y4;
    logic y5;
    logic y6;
  } lc_out_t;

  // Reconfigurable modules of the Net3 partition.
  typedef enum logic {
    CTX_A = 1'b0,   // parallel emptying of tanks A and B
    CTX_B = 1'b1    // sequential emptying: tank A, then tank B
  } net3_ctx_e;

  // Context identification code driven by each Net3 module (code[1:0]).
  localparam logic [1:0] CODE_CTX_A = 2'b01;
  localparam logic [1:0] CODE_CTX_B = 2'b10;

endpackage
