// tb_inc_block: exhaustive self-check of inc_block (5-bit half-adder chain).
// For every intermediate sum z and incoming carry the stage sum must be
// (z + cin) modulo 2^M.
module tb_inc_block;
  localparam int unsigned M = 5;
  logic [M-1:0] z, s;
  logic         cin;
  int checks = 0, failures = 0;

  inc_block #(.M(M)) dut (.z(z), .cin(cin), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iz = 0; iz < 2**M; iz++)
      for (int ic = 0; ic < 2; ic++) begin
        int unsigned exp_s;
        z = M'(iz); cin = ic[0];
        #1;
        exp_s = (iz + ic) % (2**M);
        checks++;
        if (s != M'(exp_s)) begin
          failures++;
          $display("FAIL z=%0h cin=%0b s=%0h expected %0h", z, cin, s, exp_s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
