// mod_ppa: M-bit modified parallel prefix adder, the nucleus stage's adder.
//
// Four levels:
//   preprocessing   p[i] = a[i] ^ b[i], g[i] = a[i] & b[i]
//   prefix network  group pairs P(i:0), G(i:0), computed without the carry
//                   input, so the network runs in parallel with the stages
//                   below (as the RCA blocks of the other stages do)
//   added level     r[i] = G(i:0) | P(i:0) & cin, the carry into bit i+1,
//                   which merges the previous stage's carry only at the end
//   postprocessing  s[0] = p[0] ^ cin, s[i] = p[i] ^ r[i-1]
// It also brings out the whole group's pair (p_grp, g_grp) = (P(M-1:0),
// G(M-1:0)) for the stage's skip logic and the predictor. The carry-out of
// the stage is made by the skip logic, not by this block.
//
// Interface: a, b (M bits), cin, s (M bits), p_grp, g_grp, p_bits (the bit
// propagates). Purely combinational.
module mod_ppa
  import cska_pkg::*;
#(
  parameter int unsigned   M     = 8,
  parameter prefix_style_e STYLE = PREFIX_BRENT_KUNG
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         p_grp,
  output logic         g_grp,
  output logic [M-1:0] p_bits
);
  logic [M-1:0] p, g, gp, gg, r;

  // Preprocessing.
  assign p = a ^ b;
  assign g = a & b;

  prefix_network #(.M(M), .STYLE(STYLE)) u_net (
    .p(p), .g(g), .gp(gp), .gg(gg)
  );

  // Added level: merge the incoming carry into every prefix.
  assign r = gg | (gp & {M{cin}});

  // Postprocessing.
  assign s = p ^ {r[M-2:0], cin};

  assign p_grp  = gp[M-1];
  assign g_grp  = gg[M-1];
  assign p_bits = p;

  // r[M-1] would be the carry-out; the skip logic makes it from p_grp/g_grp.
  logic unused_r;
  assign unused_r = r[M-1];
endmodule
