// canary_pkg: constants shared by the canary flip-flop evaluation design.
//
// The canary flip-flop predicts a timing error before it happens: a shadow
// flip-flop samples the same data as the main flip-flop, but through a delay
// buffer, so its setup constraint is tighter.  When the two disagree, data
// arrived inside the prediction window and the main flip-flop still holds the
// right value.  The numbers here are the evaluation set-up: a 32-bit adder and
// a delay buffer three unit delays long, a unit delay being two inverters.
// The picosecond figures are this design's own choices for simulation; they
// put the adder's longest path at 2.40 ns, the typical-corner figure quoted
// for the adder, and are ignored by synthesis.
`timescale 1ps/1ps
package canary_pkg;

  // Width of the evaluated Kogge-Stone adder.
  localparam int unsigned ADDER_WIDTH = 32;

  // Delay buffer in front of the shadow flip-flop: three unit delays.
  localparam int unsigned DELAY_UNITS = 3;

  // Inverter delay used by the simulation model of the delay buffer (ps).
  // A unit delay is two inverters, so the default window is 6 * 25 = 150 ps.
  localparam int unsigned INV_DELAY_PS = 25;

  // Delay of one logic level of the adder in simulation (ps).  The adder
  // has seven levels on its longest path: 7 * 343 ps = 2401 ps, i.e. the
  // 2.40 ns typical-corner maximum delay.
  localparam int unsigned LEVEL_DELAY_PS = 343;

  // Clock periods that the adder's longest path fixes at the typical and
  // the worst corner: 417 MHz (2398 ps) and 330 MHz (3030 ps).
  localparam int unsigned CLOCK_HIGH_PERIOD_PS = 2398;
  localparam int unsigned CLOCK_LO_PERIOD_PS   = 3030;

endpackage
