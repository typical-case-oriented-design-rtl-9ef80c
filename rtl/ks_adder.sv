// ks_adder: WIDTH-bit Kogge-Stone adder with carry-in and carry-out.
//
// Kogge-Stone is a parallel-prefix adder: after the bitwise generate and
// propagate terms, log2(WIDTH) prefix levels each combine every position with
// the one 2^(l-1) places below it, so all carries are ready after the same
// number of levels and every node has a fan-out of two.  The carry-in is
// folded into the generate term of bit 0 before the prefix tree, so bit i's
// carry is the group generate of bits i-1..0 including the carry-in.
//
// Each gate carries a simulation delay of LEVEL_DELAY_PS (ignored by
// synthesis); nodes that only pass a group through are wires.  The longest
// path is seven gates: generate/propagate, log2(WIDTH) = 5 prefix levels and
// the sum XOR (the carry-in fold sits in column 0, whose later levels are
// wires, so it adds no level).  In a timed simulation the settling time
// depends on the data: a carry that travels from bit 0 to bit 31 (for
// example A = 0xFFFFFFFF, B = 0, CIN = 1 after an all-zero vector) settles
// last.  With the default of 343 ps that is 7 * 343 = 2401 ps, the adder's
// 2.40 ns typical-corner maximum delay.
//
// Local process variation can be imitated with VARIATION_PCT: each gate's
// delay is then LEVEL_DELAY_PS scaled by a fixed pseudo-random factor in
// [100 - VARIATION_PCT, 100 + VARIATION_PCT] %, drawn per gate from
// VARIATION_SEED by an integer hash at elaboration.  Two instances with
// different seeds are two samples of a Monte-Carlo population.  The default
// of 0 gives identical gates.  The level delay is this design's choice; the adder type, width and
// the worst-case vector are the evaluated circuit's.  Set LEVEL_DELAY_PS to 0
// for a zero-delay functional model.
//
// Interface: a, b (WIDTH bits), cin; sum (WIDTH bits), cout.  Purely
// combinational.
`timescale 1ps/1ps
module ks_adder #(
  parameter int unsigned WIDTH          = canary_pkg::ADDER_WIDTH,
  parameter int unsigned LEVEL_DELAY_PS = canary_pkg::LEVEL_DELAY_PS,
  parameter int unsigned VARIATION_PCT  = 0,
  parameter int unsigned VARIATION_SEED = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  // Delay of one gate: row (0 = bitwise terms, 1 = carry-in fold, l+1 =
  // prefix level l, LEVELS+2 = sum), column, and which output (0 generate,
  // 1 propagate/sum).  The hash is a multiply-xorshift mix of the indices.
  function automatic int unsigned gate_delay(int unsigned row, int unsigned col,
                                             int unsigned which);
    logic [31:0] h;
    int          dev;
    h = VARIATION_SEED * 32'h9E37_79B1 + row * 32'h85EB_CA6B + col * 32'hC2B2_AE35
        + which * 32'h27D4_EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    dev = int'(h % (2 * VARIATION_PCT + 1)) - int'(VARIATION_PCT);
    return int'(LEVEL_DELAY_PS) * (100 + dev) / 100;
  endfunction

  // Row 0: bitwise terms.  Row 1: carry-in folded into bit 0.
  // Row l+1 (l = 1..LEVELS): after prefix level l.
  logic [LEVELS+1:0][WIDTH-1:0] g;
  logic [LEVELS+1:0][WIDTH-1:0] p;

  // Every gate is its own assignment so that each bit settles on its own
  // time; a delayed vector assignment would move all bits together.
  for (genvar i = 0; i < WIDTH; i++) begin : g_pg
    localparam int unsigned DG = gate_delay(0, i, 0);
    localparam int unsigned DP = gate_delay(0, i, 1);
    assign #(DG) g[0][i] = a[i] & b[i];
    assign #(DP) p[0][i] = a[i] ^ b[i];
  end

  localparam int unsigned D_FOLD = gate_delay(1, 0, 0);

  assign #(D_FOLD) g[1][0] = g[0][0] | (p[0][0] & cin);
  assign p[1][0] = p[0][0];
  if (WIDTH > 1) begin : g_fold_pass
    assign g[1][WIDTH-1:1] = g[0][WIDTH-1:1];
    assign p[1][WIDTH-1:1] = p[0][WIDTH-1:1];
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned SPAN = 1 << (l - 1);
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= SPAN) begin : g_node
        // Black cell: combine with the group SPAN places below.
        localparam int unsigned DG = gate_delay(l + 1, i, 0);
        localparam int unsigned DP = gate_delay(l + 1, i, 1);
        assign #(DG) g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-SPAN]);
        assign #(DP) p[l+1][i] = p[l][i] & p[l][i-SPAN];
      end else begin : g_pass
        // Group already complete down to the carry-in: pass through.
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // Carry into bit i is the group generate of bits i-1..0 (with carry-in).
  logic [WIDTH-1:0] carry;
  if (WIDTH > 1) begin : g_carry
    assign carry = {g[LEVELS+1][WIDTH-2:0], cin};
  end else begin : g_carry1
    assign carry = cin;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    localparam int unsigned DS = gate_delay(LEVELS + 2, i, 1);
    assign #(DS) sum[i] = p[0][i] ^ carry[i];
  end
  assign cout = g[LEVELS+1][WIDTH-1];

endmodule
