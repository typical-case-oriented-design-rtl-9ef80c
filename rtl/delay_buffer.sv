// delay_buffer: behavioural model of the delay element placed in front of the
// shadow flip-flop of a canary flip-flop.
//
// This is a behavioural model, not synthesizable logic: its whole purpose is
// a physical propagation delay, which RTL cannot express.  In a netlist it is
// a chain of standard-cell inverters marked so that synthesis keeps them.
//
// Structure: N_UNITS unit delays in series, each unit being two inverters, so
// the output equals the input, delayed by 2 * N_UNITS * INV_DELAY_PS.  The
// two-inverter unit and the three-unit length of the evaluation follow the
// canary flip-flop description; the inverter delay is this model's choice.
// Each inverter is an inertial continuous assignment, so a pulse shorter than
// one inverter delay is swallowed, as a real gate would do.
//
// Interface: a (input, WIDTH bits), y (output, WIDTH bits).  No clock.
`timescale 1ps/1ps
module delay_buffer #(
  parameter int unsigned WIDTH        = 1,
  parameter int unsigned N_UNITS      = canary_pkg::DELAY_UNITS,
  parameter int unsigned INV_DELAY_PS = canary_pkg::INV_DELAY_PS
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);

  localparam int unsigned N_INV = 2 * N_UNITS;

  // node[0] is the input, node[k] the output of the k-th inverter.
  logic [N_INV:0][WIDTH-1:0] node;

  assign node[0] = a;

  for (genvar k = 0; k < N_INV; k++) begin : g_inv
    assign #(INV_DELAY_PS) node[k+1] = ~node[k];
  end

  assign y = node[N_INV];

endmodule
