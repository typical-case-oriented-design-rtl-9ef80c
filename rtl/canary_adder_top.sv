// canary_adder_top: the canary flip-flop evaluation circuit, a registered
// 32-bit Kogge-Stone adder whose outputs are captured by canary flip-flops.
//
// Idea: instead of sizing the clock for the worst-case process and
// environment corner, run at typical-case timing and let canary flip-flops
// at the ends of the critical paths warn when the timing margin is used up.
// Here the critical paths are the adder's: A, B and CIN are launched from
// ordinary D flip-flops, the adder's S0..S31 and COUT are captured by
// canary flip-flops, and the per-flip-flop error predictions are ORed into
// ERR.  ERR = 1 means some output settled inside the window between the
// shadow and the main setup time: the result in sum/cout is still correct,
// but there is no margin left (for instance for lowering the supply voltage
// further).  A path later than the main setup time corrupts sum/cout and may
// go unreported; keeping operation above the first error notification avoids
// that region.
//
// Interface: clk; a_in, b_in (WIDTH bits) and cin_in, sampled at each rising
// edge.  sum/cout are the canary main outputs; err_bits[WIDTH:0] are the
// per-flip-flop predictions (bit WIDTH is COUT's) and err their OR.
// Timing: operands registered at edge k are added during cycle k and the
// result and its prediction appear after edge k+1 (two-cycle latency from
// the input pins).  With HARD_CELLS = 0 the soft canary cell is used and err
// holds for the whole cycle; with HARD_CELLS = 1 the hard cell is used and
// err is only valid while clk is high.
// No flip-flop has a reset, like the plain D flip-flop of the cell library;
// the pipeline is flushed by the first two clock edges.  LEVEL_DELAY_PS,
// VARIATION_PCT and VARIATION_SEED set the adder's simulation delays (see
// ks_adder); they do not change the logic.  The structure is
// the evaluated circuit's; combining the err signals with an OR and the
// simulation delays are this design's choices.
`timescale 1ps/1ps
module canary_adder_top #(
  parameter int unsigned WIDTH          = canary_pkg::ADDER_WIDTH,
  parameter bit          HARD_CELLS     = 1'b0,
  parameter int unsigned DELAY_UNITS    = canary_pkg::DELAY_UNITS,
  parameter int unsigned INV_DELAY_PS   = canary_pkg::INV_DELAY_PS,
  parameter int unsigned LEVEL_DELAY_PS = canary_pkg::LEVEL_DELAY_PS,
  parameter int unsigned VARIATION_PCT  = 0,
  parameter int unsigned VARIATION_SEED = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  input  logic             cin_in,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH:0]   err_bits,
  output logic             err
);

  // Launching registers: conventional D flip-flops.
  logic [WIDTH-1:0] a_q, b_q;
  logic             cin_q;

  always_ff @(posedge clk) begin
    a_q   <= a_in;
    b_q   <= b_in;
    cin_q <= cin_in;
  end

  logic [WIDTH-1:0] adder_sum;
  logic             adder_cout;

  ks_adder #(
    .WIDTH         (WIDTH),
    .LEVEL_DELAY_PS(LEVEL_DELAY_PS),
    .VARIATION_PCT (VARIATION_PCT),
    .VARIATION_SEED(VARIATION_SEED)
  ) u_adder (
    .a   (a_q),
    .b   (b_q),
    .cin (cin_q),
    .sum (adder_sum),
    .cout(adder_cout)
  );

  // Capturing registers: canary flip-flops on S0..S31 and COUT.
  if (HARD_CELLS) begin : g_hard
    canary_ff_hard #(
      .WIDTH       (WIDTH + 1),
      .DELAY_UNITS (DELAY_UNITS),
      .INV_DELAY_PS(INV_DELAY_PS)
    ) u_capture (
      .clk(clk),
      .d  ({adder_cout, adder_sum}),
      .q  ({cout, sum}),
      .err(err_bits)
    );
  end else begin : g_soft
    canary_ff #(
      .WIDTH       (WIDTH + 1),
      .DELAY_UNITS (DELAY_UNITS),
      .INV_DELAY_PS(INV_DELAY_PS)
    ) u_capture (
      .clk(clk),
      .d  ({adder_cout, adder_sum}),
      .q  ({cout, sum}),
      .err(err_bits)
    );
  end

  // Any canary flip-flop that predicts an error raises ERR.
  assign err = |err_bits;

endmodule
