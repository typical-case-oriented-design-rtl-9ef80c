// tb_ks_adder: checks the Kogge-Stone adder.
// A zero-delay 32-bit instance is compared with a + b + cin on corner
// vectors and 2000 random ones; an 8-bit instance is checked exhaustively
// over a, b and cin.  A timed 32-bit instance at the default gate delay
// must settle A = 0xFFFFFFFF, B = 0, CIN = 1 (after all zeros) exactly
// 7 gate delays (2401 ps) after the operands change, with the right sum.
`timescale 1ps/1ps
module tb_ks_adder;
  import canary_pkg::*;

  logic [31:0] a, b, s, s_t;
  logic        ci, co, co_t;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;

  ks_adder #(.LEVEL_DELAY_PS(0)) dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  ks_adder #(.WIDTH(8), .LEVEL_DELAY_PS(0)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  ks_adder dut_t (.a(a), .b(b), .cin(ci), .sum(s_t), .cout(co_t));

  int unsigned checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic apply(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] exp;
    a = x; b = y; ci = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(c);
    check({co, s} == exp, $sformatf("%h + %h + %0d", x, y, c));
  endtask

  longint unsigned t0, t_last;
  logic [32:0] out_t;
  assign out_t = {co_t, s_t};
  always begin
    @(out_t);
    t_last = $time;
  end

  initial begin : main
    logic [8:0] exp8;
    a = '0; b = '0; ci = 1'b0;
    #5000;
    // Timed worst case.
    t0 = $time;
    a = '1; b = '0; ci = 1'b1;
    #5000;
    check(t_last - t0 == longint'(7 * LEVEL_DELAY_PS), $sformatf("worst-case settle %0d ps", t_last - t0));
    check({co_t, s_t} == 33'h1_0000_0000, "worst-case timed result");

    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    for (int i = 0; i < 2000; i++) apply($urandom, $urandom, 1'($urandom));

    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(c);
          #1;
          exp8 = 9'(x) + 9'(y) + 9'(c);
          check({co8, s8} == exp8, "8-bit exhaustive");
        end
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
