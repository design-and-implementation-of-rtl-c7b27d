// inc_block: incrementation block of a CI-CSKA stage.
//
// A chain of M half adders adds the carry coming out of the previous stage
// (cin) to the intermediate sums z produced by the stage's zero-carry-in RCA
// block: s[k] = z[k] ^ t[k], t[k+1] = z[k] & t[k], t[0] = cin. The final carry
// of the chain is not produced: the stage's carry-out comes from the skip
// logic instead, which keeps the chain off the carry path.
//
// Interface: z (M bits), cin, s (M bits). Purely combinational.
module inc_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,
  input  logic         cin,
  output logic [M-1:0] s
);
  logic [M:0] t;
  assign t[0] = cin;

  for (genvar k = 0; k < M; k++) begin : g_ha
    half_adder u_ha (.a(z[k]), .b(t[k]), .s(s[k]), .c(t[k+1]));
  end

  // The chain's last carry is deliberately left unused.
  logic unused_t;
  assign unused_t = t[M];
endmodule
