// tb_mod_ppa: exhaustive self-check of the 8-bit modified prefix adder in
// both network styles. For every a, b, cin: s = (a + b + cin) mod 256, the
// group generate equals the carry-out of a + b alone, and the group
// propagate is 1 exactly when a ^ b is all ones.
module tb_mod_ppa;
  import cska_pkg::*;
  localparam int unsigned M = 8;
  logic [M-1:0] a, b, s_bk, s_ks, pb_bk, pb_ks;
  logic         cin, p_bk, g_bk, p_ks, g_ks;
  int checks = 0, failures = 0;

  mod_ppa #(.M(M), .STYLE(PREFIX_BRENT_KUNG)) dut_bk (
    .a(a), .b(b), .cin(cin), .s(s_bk), .p_grp(p_bk), .g_grp(g_bk), .p_bits(pb_bk));
  mod_ppa #(.M(M), .STYLE(PREFIX_KOGGE_STONE)) dut_ks (
    .a(a), .b(b), .cin(cin), .s(s_ks), .p_grp(p_ks), .g_grp(g_ks), .p_bits(pb_ks));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          int unsigned tot, gen;
          bit prop;
          a = M'(ia); b = M'(ib); cin = ic[0];
          #1;
          tot  = (ia + ib + ic) % 256;
          gen  = (ia + ib) / 256;
          prop = ((ia ^ ib) == 255);
          checks += 2;
          if (s_bk != M'(tot) || g_bk != gen[0] || p_bk != prop || pb_bk != M'(ia ^ ib)) begin
            failures++;
            if (failures < 10) $display("FAIL BK a=%h b=%h cin=%b s=%h", a, b, cin, s_bk);
          end
          if (s_ks != M'(tot) || g_ks != gen[0] || p_ks != prop || pb_ks != M'(ia ^ ib)) begin
            failures++;
            if (failures < 10) $display("FAIL KS a=%h b=%h cin=%b s=%h", a, b, cin, s_ks);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
