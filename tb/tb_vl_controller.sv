// tb_vl_controller: cycle-level self-check of the variable latency sequencer.
// A small model of the operand register in the testbench issues a scripted
// mix of one- and two-cycle additions with idle gaps. The expected capture
// and stall pattern is worked out per cycle: a one-cycle addition is captured
// in its first cycle, a two-cycle one stalls in its first cycle and is
// captured in its second.
module tb_vl_controller;
  import cska_pkg::*;
  logic     clk = 1'b0, rst_n = 1'b0;
  logic     op_valid;
  latency_e latency;
  logic     capture, stall;
  int checks = 0, failures = 0;
  int n_one = 0, n_two = 0;

  vl_controller dut (.clk(clk), .rst_n(rst_n), .op_valid(op_valid), .latency(latency),
                     .capture(capture), .stall(stall));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Advance to just after the next rising edge, so that inputs change away
  // from the edge.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic expect_cycle(input bit e_cap, input bit e_stall, input string what);
    #1;
    checks++;
    if (capture !== e_cap || stall !== e_stall) begin
      failures++;
      $display("FAIL %s: capture=%b stall=%b expected %b %b", what, capture, stall, e_cap, e_stall);
    end
  endtask

  // One addition of the given latency, issued right after a clock edge.
  task automatic run_op(input latency_e l);
    op_valid = 1'b1; latency = l;
    if (l == LAT_ONE_CYCLE) begin
      expect_cycle(1'b1, 1'b0, "one-cycle op, cycle 1");
      n_one++;
      tick();
    end else begin
      expect_cycle(1'b0, 1'b1, "two-cycle op, cycle 1");
      tick();
      // The operands stay in place; the latency input no longer matters.
      latency = LAT_ONE_CYCLE;
      expect_cycle(1'b1, 1'b0, "two-cycle op, cycle 2");
      n_two++;
      tick();
    end
  endtask

  initial begin
    op_valid = 1'b0; latency = LAT_ONE_CYCLE;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    expect_cycle(1'b0, 1'b0, "idle");
    tick();
    for (int n = 0; n < 400; n++) begin
      run_op(($urandom % 3 == 0) ? LAT_TWO_CYCLE : LAT_ONE_CYCLE);
      if ($urandom % 4 == 0) begin
        op_valid = 1'b0;
        latency  = latency_e'($urandom % 2);
        expect_cycle(1'b0, 1'b0, "gap");
        tick();
      end
    end
    // Reset in the middle of a two-cycle addition returns to the first state.
    op_valid = 1'b1; latency = LAT_TWO_CYCLE;
    tick();
    rst_n = 1'b0;
    tick();
    rst_n = 1'b1; latency = LAT_ONE_CYCLE;
    expect_cycle(1'b1, 1'b0, "after reset");
    checks++;
    if (n_one == 0 || n_two == 0) begin failures++; $display("FAIL mix not covered"); end
    $display("one-cycle ops %0d, two-cycle ops %0d", n_one, n_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
