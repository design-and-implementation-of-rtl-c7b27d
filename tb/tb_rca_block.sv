// tb_rca_block: exhaustive self-check of rca_block.
// Two 4-bit instances, one with a carry input (first stage) and one with the
// carry input tied off (concatenated stages), are driven with every operand
// pair and carry; sums, carry-out and the propagate product are compared with
// integer arithmetic.
module tb_rca_block;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, z0, z1;
  logic         ci, co0, co1, p0, p1;
  int checks = 0, failures = 0;

  rca_block #(.M(M), .HAS_CIN(1'b1)) dut_cin (
    .a(a), .b(b), .ci(ci), .z(z1), .co(co1), .p_all(p1));
  rca_block #(.M(M), .HAS_CIN(1'b0)) dut_nocin (
    .a(a), .b(b), .ci(ci), .z(z0), .co(co0), .p_all(p0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0h b=%0h ci=%0b", what, a, b, ci);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 2**M; ia++)
      for (int ib = 0; ib < 2**M; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          int unsigned s1, s0, pa;
          a = M'(ia); b = M'(ib); ci = ic[0];
          #1;
          s1 = ia + ib + ic;
          s0 = ia + ib;
          pa = ((ia ^ ib) == 2**M - 1) ? 1 : 0;
          check({co1, z1} == (M+1)'(s1), "with carry-in: sum");
          check({co0, z0} == (M+1)'(s0), "zero carry-in: sum");
          check(p1 == pa[0] && p0 == pa[0], "propagate product");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
