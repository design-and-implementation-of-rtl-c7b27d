// tb_vl_predictor: exhaustive self-check of the 8-bit predictor. The two-cycle
// flag must be raised exactly for operand pairs whose bits all differ.
module tb_vl_predictor;
  import cska_pkg::*;
  logic [7:0] a, b;
  latency_e   lat;
  int checks = 0, failures = 0, two = 0;

  vl_predictor #(.M(8)) dut (.a(a), .b(b), .latency(lat));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++) begin
        bit all_diff;
        a = 8'(ia); b = 8'(ib);
        #1;
        all_diff = 1'b1;
        for (int i = 0; i < 8; i++) if (a[i] == b[i]) all_diff = 1'b0;
        checks++;
        if ((lat == LAT_TWO_CYCLE) != all_diff) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h", a, b);
        end
        if (lat == LAT_TWO_CYCLE) two++;
      end
    // Exactly one b per a makes every bit differ.
    checks++;
    if (two != 256) begin failures++; $display("FAIL two-cycle count %0d", two); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
