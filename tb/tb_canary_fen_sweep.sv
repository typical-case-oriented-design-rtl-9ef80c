// tb_canary_fen_sweep: error-notification rate against circuit slowdown.
//
// A lower supply voltage makes every gate slower.  This bench stands in for
// a supply sweep with NSTEP copies of the canary adder circuit whose gate
// delay grows in 5 % steps (80 % .. 135 % of the default 343 ps), all
// clocked together.  Every gate delay also carries a fixed local variation
// of up to +-10 % (one pseudo-random sample shared by all copies), so that
// different operands excite paths of different length.  The same 100 random operand sets are run twice, at
// Clock_lo (3030 ps, 330 MHz) and at Clock_high (2398 ps, 417 MHz).  For
// every copy it counts the cycles with ERR = 1 and the cycles with a wrong
// sum, and prints the rates.  Checks, per copy and cycle:
//   - a copy whose longest path (7 gate delays) ends before the edge minus
//     the 150 ps prediction window never raises ERR and always adds right;
//   - a copy whose longest path ends before the edge always adds right;
// and per clock: the least slowed copy that raises ERR (the first error
// notification point) is less slowed than the least slowed copy that adds
// wrong, and it is reached at a smaller slowdown for Clock_high than for
// Clock_lo (less margin at the typical-corner clock).  At Clock_lo it also
// prints the histogram of settling times of the nominal copy, the
// counterpart of a delay distribution, and checks that every vector is
// counted and none is slower than seven of the slowest possible gates.
// ERR, sum and cout are read a quarter period after the edge.
`timescale 1ps/1ps
module tb_canary_fen_sweep;
  import canary_pkg::*;

  localparam int unsigned W      = ADDER_WIDTH;
  localparam int unsigned NSTEP  = 12;
  localparam int unsigned WINDOW = 2 * DELAY_UNITS * INV_DELAY_PS;
  localparam int unsigned N_RANDOM = 100;
  // Local variation of every gate delay, +-VAR %, one die (one seed) for
  // all copies, so the copies are the same circuit at different speeds.
  localparam int unsigned VAR  = 10;
  localparam int unsigned SEED = 7;

  function automatic int unsigned level_delay(int unsigned k);
    return LEVEL_DELAY_PS * (80 + 5 * k) / 100;
  endfunction

  logic         clk;
  logic [W-1:0] a_in, b_in;
  logic         cin_in;
  logic [W-1:0] sum  [NSTEP];
  logic         cout [NSTEP];
  logic         err  [NSTEP];

  for (genvar k = 0; k < NSTEP; k++) begin : g_dut
    logic [W:0] err_bits;
    canary_adder_top #(
      .LEVEL_DELAY_PS(level_delay(k)),
      .VARIATION_PCT (VAR),
      .VARIATION_SEED(SEED)
    ) dut (
      .clk     (clk),
      .a_in    (a_in),
      .b_in    (b_in),
      .cin_in  (cin_in),
      .sum     (sum[k]),
      .cout    (cout[k]),
      .err_bits(err_bits),
      .err     (err[k])
    );
  end

  int unsigned checks = 0, failures = 0;

  // Settling-time histogram of the nominal copy (100 % gate delay): time
  // from the launching edge to the last change of its adder output.
  localparam int unsigned NOMINAL = 4;
  localparam int unsigned BIN_PS  = 100;
  localparam int unsigned NBIN    = 40;
  logic [W:0]      nom_out;
  longint unsigned nom_last = 0;
  assign nom_out = {g_dut[NOMINAL].dut.adder_cout, g_dut[NOMINAL].dut.adder_sum};
  always begin
    @(nom_out);
    nom_last = $time;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Runs N_RANDOM vectors at period 'per'; returns the first-notification
  // and first-failure copy indices (NSTEP if none).
  task automatic sweep(int unsigned per, bit histogram,
                       output int unsigned fen, output int unsigned ffail);
    logic [W:0]  exp_prev, exp_cur;
    int unsigned hist [NBIN];
    longint unsigned edge_t, settle, s_max, s_sum;
    int bin;
    int unsigned n_err [NSTEP];
    int unsigned n_bad [NSTEP];
    logic [W-1:0] a, b;
    logic c;
    foreach (n_err[k]) begin n_err[k] = 0; n_bad[k] = 0; end
    foreach (hist[j]) hist[j] = 0;
    edge_t = 0; s_max = 0; s_sum = 0;
    exp_prev = '0; exp_cur = '0;
    // Flush with zeros at a slow clock.
    a_in = '0; b_in = '0; cin_in = 1'b0;
    repeat (3) begin
      #2500 clk = 1'b1;
      #2500 clk = 1'b0;
    end
    for (int i = 0; i <= int'(N_RANDOM); i++) begin
      // Falling edge: new operands (an extra zero vector at the end).
      a = (i < int'(N_RANDOM)) ? W'($urandom) : '0;
      b = (i < int'(N_RANDOM)) ? W'($urandom) : '0;
      c = (i < int'(N_RANDOM)) ? 1'($urandom) : 1'b0;
      a_in = a; b_in = b; cin_in = c;
      #(per - per / 2);
      if (histogram && i >= 1) begin
        // Vector i-1 was launched at edge_t.
        settle = (nom_last > edge_t) ? nom_last - edge_t : 0;
        bin = (settle / longint'(BIN_PS) < longint'(NBIN)) ? int'(settle / longint'(BIN_PS))
                                                             : int'(NBIN) - 1;
        hist[bin]++;
        s_max = (settle > s_max) ? settle : s_max;
        s_sum += settle;
      end
      clk = 1'b1;   // operands registered; previous result captured
      edge_t = $time;
      exp_prev = exp_cur;
      exp_cur  = {1'b0, a} + {1'b0, b} + (W+1)'(c);
      #(per / 4);
      if (i > 0) begin
        for (int k = 0; k < int'(NSTEP); k++) begin
          int unsigned path;
          path = 7 * (level_delay(k) * (100 + VAR) / 100);  // upper bound
          if (err[k]) n_err[k]++;
          if ({cout[k], sum[k]} != exp_prev) n_bad[k]++;
          if (path < per - WINDOW) check(!err[k], $sformatf("copy %0d: no prediction with margin", k));
          if (path < per) check({cout[k], sum[k]} == exp_prev, $sformatf("copy %0d: sum", k));
        end
      end
      #(per / 2 - per / 4);
      clk = 1'b0;
    end
    if (histogram) begin
      int unsigned n;
      n = 0;
      $display("settling time of the nominal copy over %0d random vectors (period %0d ps):",
               N_RANDOM, per);
      foreach (hist[j]) begin
        n += hist[j];
        if (hist[j] > 0) $display("  %4d-%4d ps: %0d", j * BIN_PS, (j + 1) * BIN_PS - 1, hist[j]);
      end
      $display("  average %0d ps, maximum %0d ps", s_sum / longint'(N_RANDOM), s_max);
      check(n == N_RANDOM, "every random vector measured");
      check(s_max <= longint'(7 * (LEVEL_DELAY_PS * (100 + VAR) / 100)),
            "no vector settles later than seven of the slowest gates");
    end
    fen = NSTEP; ffail = NSTEP;
    for (int k = int'(NSTEP) - 1; k >= 0; k--) begin
      if (n_err[k] > 0) fen = k;
      if (n_bad[k] > 0) ffail = k;
    end
    $display("period %0d ps:", per);
    for (int k = 0; k < int'(NSTEP); k++)
      $display("  gate delay %0d%% (%0d ps, path %0d ps): notifications %0d of %0d, wrong sums %0d",
               80 + 5 * k, level_delay(k), 7 * level_delay(k), n_err[k], N_RANDOM, n_bad[k]);
    $display("  first error notification at copy %0d, first wrong sum at copy %0d", fen, ffail);
  endtask

  initial begin : main
    int unsigned fen_lo, fail_lo, fen_hi, fail_hi;
    clk = 1'b0;
    #1000;
    sweep(CLOCK_LO_PERIOD_PS, 1'b1, fen_lo, fail_lo);
    sweep(CLOCK_HIGH_PERIOD_PS, 1'b0, fen_hi, fail_hi);
    check(fen_lo < NSTEP && fen_hi < NSTEP, "a notification point exists at both clocks");
    check(fen_lo < fail_lo, "Clock_lo: notification before failure");
    check(fen_hi < fail_hi, "Clock_high: notification before failure");
    check(fen_hi < fen_lo, "less margin at Clock_high than at Clock_lo");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
