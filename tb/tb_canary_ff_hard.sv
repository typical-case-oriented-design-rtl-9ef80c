// tb_canary_ff_hard: checks the hard-cell canary flip-flop bank (4 bits, default
// 3-unit delay buffer, so the prediction window is 150 ps wide).
// The clock period is 1000 ps.  Before each rising edge the data input is
// changed from an old to a new value at a chosen offset from the edge:
//   offset 400 ps or 151 ps before the edge: q = new, err = 0;
//   offset 149 ps or 10 ps before the edge:  q = new, err = old ^ new;
//   offset 10 ps after the edge:             q = old, err = 0 (missed).
// Outputs are checked 250 ps after the edge, while the clock is high; at
// 750 ps, with the clock low, err must be 0 (the hard cell's prediction is
// a high-phase pulse), and likewise 50 ps after a change in the low phase,
// while the shadow latch still lags; one cycle later, with the input stable, err must be
// 0 as well.  Each region must occur.
`timescale 1ps/1ps
module tb_canary_ff_hard;
  import canary_pkg::*;

  localparam int unsigned PERIOD = 1000;
  localparam int          WINDOW = 2 * DELAY_UNITS * INV_DELAY_PS;

  logic       clk;
  logic [3:0] d, q, err;

  canary_ff_hard #(.WIDTH(4)) dut (.clk(clk), .d(d), .q(q), .err(err));

  int unsigned checks = 0, failures = 0;
  int unsigned n_none = 0, n_predicted = 0, n_missed = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Clock: rising edges at multiples of PERIOD, high for the first half.
  initial begin
    clk = 1'b0;
    #(PERIOD);
    forever begin
      clk = 1'b1;
      #(PERIOD / 2) clk = 1'b0;
      #(PERIOD / 2);
    end
  end

  // One trial: 'offset' is how long before the edge (negative: after) the
  // input changes from 'o' to 'n'.  Entered 250 ps after an edge.
  task automatic trial(logic [3:0] o, logic [3:0] n, int offset);
    d = o;
    // Wait for the second next edge minus the offset, with 'o' settled.
    #(PERIOD - 250);          // at an edge; 'o' captured
    #(PERIOD - offset);
    d = n;
    if (offset > 100) begin
      // Clock low, the shadow latch still shows the old value: no pulse.
      #50;
      check(err == '0, "err is 0 while the clock is low and the latches differ");
      #(offset + 200);
    end else begin
      #(offset + 250);          // 250 ps after the edge under test
    end
    if (offset > WINDOW) begin
      n_none++;
      check(q == n && err == '0, $sformatf("early data (%0d ps): q=%h err=%h", offset, q, err));
    end else if (offset > 0) begin
      n_predicted++;
      check(q == n && err == (o ^ n), $sformatf("window data (%0d ps): q=%h err=%h", offset, q, err));
    end else begin
      n_missed++;
      check(q == o && err == '0, $sformatf("late data (%0d ps): q=%h err=%h", offset, q, err));
    end
    #(PERIOD / 2);
    check(err == '0, "err is 0 while the clock is low");
    #(PERIOD / 2);
    check(q == n && err == '0, "stable data: no prediction");
  endtask

  int offsets [5] = '{400, WINDOW + 1, WINDOW - 1, 10, -10};

  initial begin : main
    logic [3:0] o, n;
    d = '0;
    #(PERIOD + 250);
    for (int r = 0; r < 10; r++)
      foreach (offsets[k]) begin
        o = 4'($urandom);
        n = 4'($urandom);
        if (n == o) n = ~o;
        trial(o, n, offsets[k]);
      end
    check(n_none > 0 && n_predicted > 0 && n_missed > 0, "all three regions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
