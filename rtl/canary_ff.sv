// canary_ff: a bank of WIDTH soft canary flip-flops.
//
// Each bit is a main flip-flop and a shadow flip-flop clocked by the same
// clock edge.  The main flip-flop samples D directly; the shadow flip-flop
// samples D after a delay buffer, so its setup constraint is tighter by the
// buffer delay.  The exclusive-OR of the two outputs is the bit's error
// prediction:
//   - data settles before P - Tsu_shadow: both agree, err = 0, q correct;
//   - data settles between P - Tsu_shadow and P - Tsu_main: the shadow still
//     holds the old value, err = 1, yet q is correct (timing error predicted);
//   - data settles after P - Tsu_main: both miss the new value, q is wrong and
//     err may stay 0 (timing error not caught).
// The structure (two flip-flops, a delay of inverter pairs, an XOR) is the
// soft-cell form of the canary flip-flop built from ordinary standard cells.
//
// Interface: clk; d[WIDTH]; q[WIDTH] is the main flip-flop output; err[WIDTH]
// is the per-bit prediction, valid for the whole cycle after the clock edge
// that sampled d.  Timing: one register stage, no reset, as in the plain
// D flip-flop the cell replaces.  In simulation the main flip-flop has zero
// setup time and the shadow flip-flop's setup time is the buffer delay,
// 2 * DELAY_UNITS * INV_DELAY_PS; synthesis sees only the delay buffer model.
`timescale 1ps/1ps
module canary_ff #(
  parameter int unsigned WIDTH        = 1,
  parameter int unsigned DELAY_UNITS  = canary_pkg::DELAY_UNITS,
  parameter int unsigned INV_DELAY_PS = canary_pkg::INV_DELAY_PS
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] err
);

  logic [WIDTH-1:0] d_delayed;  // D after the delay buffer
  logic [WIDTH-1:0] q_shadow;   // shadow flip-flop output

  delay_buffer #(
    .WIDTH       (WIDTH),
    .N_UNITS     (DELAY_UNITS),
    .INV_DELAY_PS(INV_DELAY_PS)
  ) u_delay (
    .a(d),
    .y(d_delayed)
  );

  // Main flip-flop.
  always_ff @(posedge clk) q <= d;

  // Shadow flip-flop, same clock edge, delayed data.
  always_ff @(posedge clk) q_shadow <= d_delayed;

  // Error prediction: the two samples disagree.
  assign err = q ^ q_shadow;

endmodule
