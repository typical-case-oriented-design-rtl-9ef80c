// canary_ff_hard: a bank of WIDTH canary flip-flops in the area-optimised
// hard-cell form.
//
// The hard cell keeps the full master-slave main flip-flop but reduces the
// shadow flip-flop to its master latch; the slave latch is left out to save
// area.  Both master latches are transparent while the clock is low and
// close on the rising edge, so during the high phase each holds the value it
// sampled at that edge: the main one the direct D, the shadow one D after the
// delay buffer.  The error output compares the two held samples and is
// qualified by the high clock phase, because while the clock is low the
// shadow latch is transparent and its value is not a sample.
//
// Interface: clk; d[WIDTH]; q[WIDTH] is the main flip-flop output, updated at
// the rising edge; err[WIDTH] is the prediction, a pulse during the high
// phase of the cycle that follows the sampling edge and 0 while clk is low.
// Read it while clk is high or capture it on the falling edge.
// The three latches per bit are intentional: they are the cell's storage
// elements.  The error gating with the clock is likewise the cell's
// behaviour; it is a clock-derived signal by design.
// The latch-level structure follows the cell description; writing the main
// flip-flop as two latches instead of an edge-triggered process, and the
// exact point where the clock qualifies the comparison, are this model's
// choices.
`timescale 1ps/1ps
module canary_ff_hard #(
  parameter int unsigned WIDTH        = 1,
  parameter int unsigned DELAY_UNITS  = canary_pkg::DELAY_UNITS,
  parameter int unsigned INV_DELAY_PS = canary_pkg::INV_DELAY_PS
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] err
);

  logic [WIDTH-1:0] d_delayed;    // D after the delay buffer
  logic [WIDTH-1:0] main_master;  // master latch of the main flip-flop
  logic [WIDTH-1:0] shadow_master;// the shadow's only latch

  delay_buffer #(
    .WIDTH       (WIDTH),
    .N_UNITS     (DELAY_UNITS),
    .INV_DELAY_PS(INV_DELAY_PS)
  ) u_delay (
    .a(d),
    .y(d_delayed)
  );

  // Main flip-flop: master latch open while clk is low, slave while high.
  always_latch begin
    if (!clk) main_master = d;
  end

  always_latch begin
    if (clk) q = main_master;
  end

  // Shadow: master latch only.
  always_latch begin
    if (!clk) shadow_master = d_delayed;
  end

  // Comparison of the two samples, valid while clk is high.
  assign err = {WIDTH{clk}} & (main_master ^ shadow_master);

endmodule
