// rca_block: M-bit ripple carry adder block of a carry skip adder stage.
//
// Every stage of the CI-CSKA holds one such block. In the first stage the block
// takes the adder's carry input (HAS_CIN = 1) and is a chain of M full adders.
// In every other stage the block's carry input is zero (the concatenation
// scheme), so its first cell is a half adder and all blocks work in parallel
// instead of waiting for the carry of the previous stage. The block outputs
// its intermediate sums z (which the incrementation block corrects later), its
// carry-out co, and the product of its propagate signals p_all = &(a ^ b),
// which the skip logic uses.
//
// Interface: a, b (M bits), ci (ignored when HAS_CIN = 0), z (M bits), co,
// p_all. Purely combinational.
module rca_block #(
  parameter int unsigned M       = 4,
  parameter bit          HAS_CIN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] z,
  output logic         co,
  output logic         p_all
);
  logic [M:0] c;

  assign p_all = &(a ^ b);

  if (HAS_CIN) begin : g_cin
    assign c[0] = ci;
    full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(z[0]), .co(c[1]));
  end else begin : g_nocin
    // Carry input fixed at zero: the first cell reduces to a half adder.
    assign c[0] = 1'b0;
    half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(z[0]), .c(c[1]));
  end

  for (genvar i = 1; i < M; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(z[i]), .co(c[i+1]));
  end

  assign co = c[M];

  // ci is only read when the block has a carry input.
  logic unused_ci;
  assign unused_ci = HAS_CIN ? 1'b0 : ci;
endmodule
