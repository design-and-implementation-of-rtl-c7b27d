// tb_prefix_network: exhaustive self-check of prefix_network at M = 8, in the
// Brent-Kung and the Kogge-Stone style, plus a random check at M = 6 (not a
// power of two). The reference forms every prefix (P(i:0), G(i:0)) by a
// sequential bit-by-bit scan.
module tb_prefix_network;
  import cska_pkg::*;
  logic [7:0] p, g, gp_bk, gg_bk, gp_ks, gg_ks;
  logic [5:0] p6, g6, gp6, gg6;
  int checks = 0, failures = 0;

  prefix_network #(.M(8), .STYLE(PREFIX_BRENT_KUNG))  dut_bk (.p(p), .g(g), .gp(gp_bk), .gg(gg_bk));
  prefix_network #(.M(8), .STYLE(PREFIX_KOGGE_STONE)) dut_ks (.p(p), .g(g), .gp(gp_ks), .gg(gg_ks));
  prefix_network #(.M(6), .STYLE(PREFIX_BRENT_KUNG))  dut_6  (.p(p6), .g(g6), .gp(gp6), .gg(gg6));

  function automatic void ref_prefix(input logic [7:0] pi, gi, input int n,
                                     output logic [7:0] po, go);
    logic pa = 1'b1, ga = 1'b0;
    po = '0; go = '0;
    for (int i = 0; i < n; i++) begin
      ga = gi[i] | (pi[i] & ga);
      pa = pi[i] & pa;
      po[i] = pa; go[i] = ga;
    end
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ep, eg;
    for (int v = 0; v < 65536; v++) begin
      {p, g} = v[15:0];
      #1;
      ref_prefix(p, g, 8, ep, eg);
      checks += 2;
      if (gp_bk != ep || gg_bk != eg) begin
        failures++;
        if (failures < 10) $display("FAIL BK p=%h g=%h", p, g);
      end
      if (gp_ks != ep || gg_ks != eg) begin
        failures++;
        if (failures < 10) $display("FAIL KS p=%h g=%h", p, g);
      end
    end
    for (int v = 0; v < 4096; v++) begin
      {p6, g6} = v[11:0];
      #1;
      ref_prefix({2'b00, p6}, {2'b00, g6}, 6, ep, eg);
      checks++;
      if (gp6 != ep[5:0] || gg6 != eg[5:0]) begin
        failures++;
        if (failures < 10) $display("FAIL BK6 p=%h g=%h", p6, g6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
