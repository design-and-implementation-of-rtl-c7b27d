// half_adder: one-bit half adder, s = a ^ b, c = a & b.
// Used as the first cell of a zero-carry-in RCA block and as the cell of the
// incrementation chain. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
