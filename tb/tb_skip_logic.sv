// tb_skip_logic: self-check of both skip gate styles.
// For every block generate G, propagate product P and incoming carry C the
// stage carry must be G | (P & C): the AOI style is fed true signals and must
// return the inverted carry, the OAI style is fed inverted signals and must
// return the true carry. Chaining AOI into OAI must give the two-stage carry.
module tb_skip_logic;
  logic g, p, c, g2, p2;
  logic aoi_out, oai_out, chain_out;
  int checks = 0, failures = 0;

  skip_logic #(.OAI(1'b0)) dut_aoi (.g_x(g),  .p_x(p),  .c_x(c),  .co_x(aoi_out));
  skip_logic #(.OAI(1'b1)) dut_oai (.g_x(~g), .p_x(~p), .c_x(~c), .co_x(oai_out));
  // AOI stage followed by an OAI stage, as in the adder.
  skip_logic #(.OAI(1'b1)) dut_chain (.g_x(~g2), .p_x(~p2), .c_x(aoi_out), .co_x(chain_out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      bit carry1, carry2;
      {g2, p2, g, p, c} = v[4:0];
      #1;
      carry1 = g || (p && c);
      carry2 = g2 || (p2 && carry1);
      checks += 3;
      if (aoi_out !== !carry1) begin failures++; $display("FAIL AOI v=%0d", v); end
      if (oai_out !== carry1)  begin failures++; $display("FAIL OAI v=%0d", v); end
      if (chain_out !== carry2) begin failures++; $display("FAIL chain v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
