// tb_delay_buffer: checks the delay element of the canary flip-flop.
// A step on the input must reach the output exactly 2 * N_UNITS inverter
// delays later (150 ps at the defaults: three units of two 25 ps
// inverters), not earlier, and with the same polarity; a second instance
// with one unit must give 50 ps.  Random 4-bit values, held longer than the
// delay, must come out unchanged.
`timescale 1ps/1ps
module tb_delay_buffer;
  import canary_pkg::*;

  localparam int unsigned DLY3 = 2 * DELAY_UNITS * INV_DELAY_PS;
  localparam int unsigned DLY1 = 2 * INV_DELAY_PS;

  logic [3:0] a;
  logic [3:0] y3, y1;

  delay_buffer #(.WIDTH(4)) dut3 (.a(a), .y(y3));
  delay_buffer #(.WIDTH(4), .N_UNITS(1)) dut1 (.a(a), .y(y1));

  int unsigned checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  longint unsigned t_in, t_out3, t_out1;
  logic [3:0] v;

  initial begin : main
    a = 4'h0;
    #1000;
    for (int i = 0; i < 20; i++) begin
      v = 4'($urandom);
      if (v == a) v = ~a;
      a = v;
      t_in = $time;
      #(DLY1 - 1);
      check(y1 != v, "one-unit output not yet changed");
      #1;
      check(y1 == v, "one-unit output arrives after 2 inverter delays");
      #(DLY3 - DLY1 - 1);
      check(y3 != v, "three-unit output not yet changed");
      #1;
      check(y3 == v, "three-unit output arrives after 6 inverter delays");
      #500;
      check(y3 == a && y1 == a, "outputs hold the input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
