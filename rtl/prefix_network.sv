// prefix_network: parallel prefix network of the nucleus stage.
//
// From the bit propagate/generate pairs (p[i], g[i]) it forms the group pairs
// of every prefix, gp[i] = P(i:0) and gg[i] = G(i:0), with the prefix operator
//   (P_hi, G_hi) o (P_lo, G_lo) = (P_hi & P_lo, G_hi | P_hi & G_lo).
// Every cell keeps the group propagate as well as the group generate, because
// the added level of the modified PPA merges the incoming carry with both.
//
// STYLE = PREFIX_BRENT_KUNG (default) builds the Brent-Kung tree: an up-sweep
// forming spans 2:1, 4:3, ..., then 4:1, 8:5, ..., then 8:1, followed by a
// down-sweep filling 6:1 and then 3:1, 5:1, 7:1 (for M = 8, 1-based
// positions). STYLE = PREFIX_KOGGE_STONE builds the Kogge-Stone network, log2 M
// levels at distances 1, 2, 4, ... The structure is written as loops over the
// levels; synthesis unrolls them into the cells of the chosen network.
//
// Interface: p, g (M bits), gp, gg (M bits). Purely combinational.
module prefix_network
  import cska_pkg::*;
#(
  parameter int unsigned   M     = 8,
  parameter prefix_style_e STYLE = PREFIX_BRENT_KUNG
) (
  input  logic [M-1:0] p,
  input  logic [M-1:0] g,
  output logic [M-1:0] gp,
  output logic [M-1:0] gg
);
  // Largest power of two below M: sets where the Brent-Kung down-sweep starts.
  function automatic int unsigned pow2_below(input int unsigned n);
    int unsigned v = 1;
    while (2 * v < n) v = 2 * v;
    return v;
  endfunction

  localparam int unsigned TOP = pow2_below(M);

  always_comb begin
    logic [M-1:0] pp, gg_w;
    pp   = p;
    gg_w = g;
    if (STYLE == PREFIX_BRENT_KUNG) begin
      // Up-sweep: node i takes the span ending d below it.
      for (int unsigned d = 1; d < M; d = 2 * d) begin
        for (int unsigned i = 2 * d - 1; i < M; i = i + 2 * d) begin
          gg_w[i] = gg_w[i] | (pp[i] & gg_w[i-d]);
          pp[i]   = pp[i] & pp[i-d];
        end
      end
      // Down-sweep: fill the remaining prefixes.
      for (int unsigned d = TOP / 2; d >= 1; d = d / 2) begin
        for (int unsigned i = 3 * d - 1; i < M; i = i + 2 * d) begin
          gg_w[i] = gg_w[i] | (pp[i] & gg_w[i-d]);
          pp[i]   = pp[i] & pp[i-d];
        end
      end
    end else begin
      // Kogge-Stone: every node at every level; descending order keeps the
      // operands of a level at their previous-level values.
      for (int unsigned d = 1; d < M; d = 2 * d) begin
        for (int i = M - 1; i >= int'(d); i--) begin
          gg_w[i] = gg_w[i] | (pp[i] & gg_w[i-d]);
          pp[i]   = pp[i] & pp[i-d];
        end
      end
    end
    gp = pp;
    gg = gg_w;
  end
endmodule
