// tb_hvl_cska: end-to-end self-check of the hybrid variable latency adder at
// its default size (32 bits, 13 stages, 8-bit Brent-Kung nucleus).
//
// A random source offers additions with random idle gaps and holds an offer
// while in_ready is low. Operands are drawn as plain random numbers, as pairs
// whose nucleus bits all propagate (two-cycle additions), as pairs where
// every bit propagates, and as carry chains that start below the nucleus.
// A scoreboard compares every result with integer addition, checks the
// prediction flag against its own evaluation of the nucleus bits, and checks
// the latency: the result appears one clock after acceptance for a
// one-cycle addition and two clocks after for a two-cycle one. It counts how
// often each mechanism occurs (one-cycle addition, two-cycle addition, stall
// with a waiting offer, back-to-back issue, carry out, carry passed through
// the nucleus) and fails if one never occurs.
module tb_hvl_cska;
  import cska_pkg::*;
  localparam int unsigned W       = 32;
  localparam int unsigned NUC_LSB = 13;   // stages 0..6 hold 1+1+1+2+2+3+3 bits
  localparam int unsigned NUC_SZ  = 8;
  localparam int          N_OPS   = 50000;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid, in_ready, cin, out_valid, cout, out_two_cycle;
  logic [W-1:0] a, b, sum;

  hvl_cska dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .cin(cin), .out_valid(out_valid), .sum(sum), .cout(cout),
    .out_two_cycle(out_two_cycle)
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [W:0] total;
    bit         two;
    longint     accepted_at;
  } expect_t;

  expect_t exp_q[$];
  longint  cycle = 0;
  int checks = 0, failures = 0, results = 0;
  int n_one = 0, n_two = 0, n_stall_wait = 0, n_b2b = 0, n_cout = 0, n_through = 0;
  bit last_accept = 1'b0;

  initial begin
    repeat (N_OPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d results", results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard and counters, sampled on the rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        expect_t e;
        logic [NUC_SZ-1:0] pn;
        logic [NUC_LSB:0]  low;
        e.total = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
        pn = a[NUC_LSB +: NUC_SZ] ^ b[NUC_LSB +: NUC_SZ];
        e.two = (pn == '1);
        e.accepted_at = cycle;
        exp_q.push_back(e);
        if (last_accept) n_b2b++;
        // Carry into the nucleus passed straight through it.
        low = {1'b0, a[NUC_LSB-1:0]} + {1'b0, b[NUC_LSB-1:0]} + (NUC_LSB+1)'(cin);
        if (e.two && low[NUC_LSB]) n_through++;
      end
      if (in_valid && !in_ready) n_stall_wait++;
      last_accept <= in_valid && in_ready;

      if (out_valid) begin
        results++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL result without a pending addition");
        end else begin
          expect_t e;
          longint lat;
          e = exp_q.pop_front();
          lat = cycle - e.accepted_at;
          if ({cout, sum} != e.total) begin
            failures++;
            if (failures < 10) $display("FAIL sum %b_%h expected %h", cout, sum, e.total);
          end
          checks++;
          if (out_two_cycle != e.two) begin
            failures++;
            if (failures < 10) $display("FAIL prediction %b expected %b", out_two_cycle, e.two);
          end
          checks++;
          if (lat != (e.two ? 3 : 2)) begin
            failures++;
            if (failures < 10) $display("FAIL latency %0d for two=%b", lat, e.two);
          end
          if (e.two) n_two++; else n_one++;
          if (cout) n_cout++;
        end
      end
    end
  end

  task automatic new_operands();
    logic [W-1:0] ra, rb;
    int kind = $urandom % 6;
    ra = $urandom; rb = $urandom;
    case (kind)
      0, 1: ;                                                    // plain random
      2: rb[NUC_LSB +: NUC_SZ] = ~ra[NUC_LSB +: NUC_SZ];       // nucleus propagates
      3: rb = ~ra;                                               // every bit propagates
      4: begin                                                   // carry from below the nucleus
        rb[NUC_LSB +: NUC_SZ] = ~ra[NUC_LSB +: NUC_SZ];
        ra[NUC_LSB-1:0] = '1;
        rb[NUC_LSB-1:0] = 13'($urandom) | 13'h1;
      end
      default: begin ra = '1; rb = 32'($urandom % 4); end
    endcase
    a = ra; b = rb; cin = 1'($urandom);
  endtask

  initial begin
    int issued = 0;
    in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (issued < N_OPS) begin
      @(posedge clk);
      // An offer accepted on this edge is done; otherwise it is held.
      if (in_valid && in_ready) begin
        issued++;
        in_valid <= 1'b0;
      end
      #1;
      if (!in_valid && issued < N_OPS && ($urandom % 8 != 0)) begin
        new_operands();
        in_valid = 1'b1;
      end
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (results != N_OPS || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results for %0d additions", results, N_OPS);
    end
    $display("one-cycle %0d  two-cycle %0d  stalled offers %0d  back-to-back %0d  carry-out %0d  carry through nucleus %0d",
             n_one, n_two, n_stall_wait, n_b2b, n_cout, n_through);
    checks += 6;
    if (n_one == 0)        begin failures++; $display("FAIL no one-cycle addition"); end
    if (n_two == 0)        begin failures++; $display("FAIL no two-cycle addition"); end
    if (n_stall_wait == 0) begin failures++; $display("FAIL no stalled offer"); end
    if (n_b2b == 0)        begin failures++; $display("FAIL no back-to-back issue"); end
    if (n_cout == 0)       begin failures++; $display("FAIL no carry out"); end
    if (n_through == 0)    begin failures++; $display("FAIL no carry through the nucleus"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
