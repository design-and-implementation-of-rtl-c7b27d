// vl_predictor: one-cycle/two-cycle predictor of the hybrid adder.
//
// It looks only at the operand bits of the nucleus stage. When every one of
// them is in propagate mode (a[i] ^ b[i] = 1 for all M bits), the nucleus
// passes the carry of the stages below it straight on, so the carry may
// travel from the least significant stage through the nucleus to the most
// significant stage: the longest path, which is given two clock cycles.
// Otherwise the nucleus carry-out equals its group generate, the stages below
// and above the nucleus are decoupled, and the sum settles within one cycle.
// The source names this block and shows that it reads the nucleus inputs; the
// exact condition above is this design's reading of the structure.
//
// Interface: a, b (M bits, the nucleus slice of the operands), latency.
// Purely combinational.
module vl_predictor
  import cska_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output latency_e     latency
);
  assign latency = (&(a ^ b)) ? LAT_TWO_CYCLE : LAT_ONE_CYCLE;
endmodule
