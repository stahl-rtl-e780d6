// comb_inverter_model: behavioural model of the example combinational logic
// that surrounds the scan chain in the test-procedure example: each bit is
// inverted, d[i] = ~q[i], after a propagation delay of DELAY_PS picoseconds.
// The delay matters: the fast capture cycle relies on the logic not having
// propagated the newly applied test pattern by the time the clock rises.
// Not synthesizable (it has a delay); used by testbenches only.
`timescale 1ps/1ps
module comb_inverter_model #(
  parameter int unsigned WIDTH    = 3,
  parameter int unsigned DELAY_PS = 100
) (
  input  logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] d
);
  assign #(DELAY_PS) d = ~q;
endmodule
