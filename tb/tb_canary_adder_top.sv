// tb_canary_adder_top: end-to-end test of the canary adder circuit at its
// default parameters (soft canary cells, 3-unit delay buffer, 2.40 ns
// longest adder path).
//
// The bench drives the clock itself so that every cycle can have its own
// period; shortening the period plays the part of a slower circuit (lower
// supply voltage) against a fixed clock.  Operands change at the falling
// edge.  For each cycle it takes two snapshots of the adder output, one
// just before (edge - shadow setup window) and one just before the edge,
// and after the edge it checks:
//   - q equals the main snapshot and err_bits equals main ^ shadow snapshot;
//   - q equals a + b + cin computed here whenever the main snapshot was
//     already settled, and differs from it when it was not;
//   - the settling time of the worst-case vector (A = 0xFFFFFFFF, B = 0,
//     CIN = 1 after an all-zero vector) is exactly 7 gate levels = 2401 ps, and
//     at 3030 ps / 2500 ps / 2398 ps the outcome is no error / error
//     predicted with a correct result / wrong result, as the setup-window
//     arithmetic says.
// Each cycle is counted as no error, error predicted, or error occurred;
// each of the three must happen at least once.  100 random vectors are
// run at a series of periods and the notification rate is printed.
`timescale 1ps/1ps
module tb_canary_adder_top;
  import canary_pkg::*;

  localparam int unsigned W      = ADDER_WIDTH;
  localparam int unsigned WINDOW = 2 * DELAY_UNITS * INV_DELAY_PS;  // 150 ps
  localparam int unsigned WORST_SETTLE_PS = 7 * LEVEL_DELAY_PS;     // 2401 ps
  localparam int unsigned N_RANDOM = 100;

  typedef struct packed {
    logic [W-1:0] a;
    logic [W-1:0] b;
    logic         cin;
  } vec_t;

  logic         clk;
  logic [W-1:0] a_in, b_in;
  logic         cin_in;
  logic [W-1:0] sum;
  logic         cout;
  logic [W:0]   err_bits;
  logic         err;

  canary_adder_top dut (
    .clk     (clk),
    .a_in    (a_in),
    .b_in    (b_in),
    .cin_in  (cin_in),
    .sum     (sum),
    .cout    (cout),
    .err_bits(err_bits),
    .err     (err)
  );

  int unsigned checks = 0, failures = 0;
  int unsigned n_none = 0, n_predicted = 0, n_occurred = 0, n_missed = 0;
  int unsigned n_notify = 0;   // checked cycles with err = 1

  // Time of the most recent change of the adder output.
  longint unsigned last_change = 0;
  logic [W:0] adder_out;
  assign adder_out = {dut.adder_cout, dut.adder_sum};
  always begin
    @(adder_out);
    last_change = $time;
  end

  // Per-cycle bookkeeping: the vector in the adder and its snapshots.
  vec_t            cur, prev;
  logic [W:0]      snap_shadow, snap_main, prev_shadow, prev_main;
  longint unsigned edge_time, prev_settle;
  bit              prev_valid;
  int unsigned     cycle_kind;   // of the last checked cycle: 0 none, 1 predicted, 2 occurred

  function automatic logic [W:0] golden(vec_t v);
    return {1'b0, v.a} + {1'b0, v.b} + (W+1)'(v.cin);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Checks the result of 'prev', captured at the rising edge just applied.
  task automatic check_prev();
    logic [W:0] exp, got;
    if (!prev_valid) return;
    exp = golden(prev);
    got = {cout, sum};
    check(got == prev_main, "main flip-flops hold the value present at the edge");
    check(err_bits == (prev_main ^ prev_shadow), "err_bits = main sample ^ shadow sample");
    check(err == |(prev_main ^ prev_shadow), "err is the OR of the predictions");
    if (err) n_notify++;
    if (prev_main == exp) begin
      check(got == exp, "settled result is the sum");
      if (prev_shadow == exp) begin
        cycle_kind = 0; n_none++;
        check(!err, "no prediction when both samples are settled");
      end else begin
        cycle_kind = 1; n_predicted++;
        check(err, "prediction when only the shadow sample is stale");
      end
    end else begin
      cycle_kind = 2; n_occurred++;
      check(got != exp, "late result differs from the sum");
      if (!err) n_missed++;
    end
  endtask

  // One clock cycle of 'per' ps.  Entered right after a rising edge; leaves
  // right after the next one.  'nxt' is applied at the falling edge.
  task automatic step(vec_t nxt, int unsigned per);
    #(per / 4);
    check_prev();
    #(per / 2 - per / 4);
    clk = 1'b0;
    a_in = nxt.a; b_in = nxt.b; cin_in = nxt.cin;
    #(per / 2 - WINDOW - 1);
    snap_shadow = {dut.adder_cout, dut.adder_sum};
    #(WINDOW);
    snap_main = {dut.adder_cout, dut.adder_sum};
    prev_settle = last_change - edge_time;
    #1;
    clk = 1'b1;
    edge_time   = $time;
    prev        = cur;
    prev_main   = snap_main;
    prev_shadow = snap_shadow;
    prev_valid  = 1'b1;
    cur         = nxt;
  endtask

  function automatic vec_t rand_vec();
    vec_t v;
    v.a = $urandom; v.b = $urandom; v.cin = 1'($urandom);
    return v;
  endfunction

  localparam vec_t ZERO  = '{a: '0, b: '0, cin: 1'b0};
  localparam vec_t WORST = '{a: '1, b: '0, cin: 1'b1};

  // Worst-case vector after an all-zero one at period 'per'; returns the
  // kind of the cycle that carried the worst-case vector.
  task automatic worst_case(int unsigned per, output int unsigned kind,
                            output longint unsigned settle);
    step(ZERO, 4000);
    step(WORST, 4000);   // ZERO in the adder
    step(ZERO, per);     // WORST in the adder, captured at the end
    settle = prev_settle;
    step(ZERO, 4000);    // checks the WORST result
    kind = cycle_kind;
  endtask

  int unsigned periods [6] = '{CLOCK_LO_PERIOD_PS, 2650, 2500, CLOCK_HIGH_PERIOD_PS, 2300, 2000};

  initial begin : main
    int unsigned kind, n_err;
    longint unsigned settle;
    clk = 1'b0; a_in = '0; b_in = '0; cin_in = 1'b0;
    prev_valid = 1'b0; cur = ZERO; edge_time = 0;
    #2000;
    clk = 1'b1; edge_time = $time;
    // Flush the registers, which have no reset.
    repeat (3) step(ZERO, 4000);

    // Worst-case path and the three timing regions.
    worst_case(CLOCK_LO_PERIOD_PS, kind, settle);
    check(settle == longint'(WORST_SETTLE_PS), $sformatf("worst-case settle %0d ps", settle));
    check(kind == 0, "worst case at Clock_lo: no error");
    worst_case(2500, kind, settle);
    check(kind == 1, "worst case at 2500 ps: error predicted, result correct");
    worst_case(CLOCK_HIGH_PERIOD_PS, kind, settle);
    check(kind == 2, "worst case at Clock_high (2398 ps): error occurred");

    // Random operands at a series of clock periods.
    foreach (periods[p]) begin
      longint unsigned s_min, s_max, s_sum;
      s_min = '1; s_max = 0; s_sum = 0;
      n_err = n_notify;
      for (int i = 0; i < N_RANDOM; i++) begin
        step(rand_vec(), periods[p]);
        if (i > 0) begin
          s_min = (prev_settle < s_min) ? prev_settle : s_min;
          s_max = (prev_settle > s_max) ? prev_settle : s_max;
          s_sum += prev_settle;
        end
      end
      if (p == 0) begin
        $display("random settling time at %0d ps: min %0d avg %0d max %0d ps", periods[p],
                 s_min, s_sum / (longint'(N_RANDOM) - 1), s_max);
        check(s_max <= longint'(WORST_SETTLE_PS), "no random vector is slower than the worst case");
      end
      step(ZERO, 4000);
      n_err = n_notify - n_err;
      $display("period %0d ps: error notifications %0d of %0d", periods[p], n_err, N_RANDOM);
    end

    $display("cycles: no error %0d, predicted %0d, occurred %0d (unreported %0d)",
             n_none, n_predicted, n_occurred, n_missed);
    check(n_none > 0, "no-error case exercised");
    check(n_predicted > 0, "error-predicted case exercised");
    check(n_occurred > 0, "error-occurred case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
