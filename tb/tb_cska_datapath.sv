// tb_cska_datapath: self-check of the combinational adder in four builds:
//   d_bk  default: 32 bits, hybrid, Brent-Kung nucleus
//   d_ks  32 bits, hybrid, Kogge-Stone nucleus
//   d_ci  32 bits, plain CI-CSKA (nucleus built as RCA + incrementation)
//   d_26  26 bits with stage list {1,1,1,2,2,3,3,8,2,2,1}, hybrid
//   d_fss 32 bits, fixed stage size: eight 4-bit stages, plain CI-CSKA
// Each is compared with integer addition on directed patterns (all stages
// propagating, carries that skip one or many stages, all ones, all zeros) and
// on random operands, some of them with whole stages forced to propagate.
module tb_cska_datapath;
  import cska_pkg::*;
  localparam int unsigned SZ26 [11] = '{1, 1, 1, 2, 2, 3, 3, 8, 2, 2, 1};
  localparam int unsigned SZFSS [8] = '{4, 4, 4, 4, 4, 4, 4, 4};

  logic [31:0] a, b, s_bk, s_ks, s_ci, s_fss;
  logic [25:0] s_26;
  logic        cin, c_bk, c_ks, c_ci, c_26, c_fss;
  int checks = 0, failures = 0;

  cska_datapath dut_bk (.a(a), .b(b), .cin(cin), .sum(s_bk), .cout(c_bk));
  cska_datapath #(.STYLE(PREFIX_KOGGE_STONE)) dut_ks (
    .a(a), .b(b), .cin(cin), .sum(s_ks), .cout(c_ks));
  cska_datapath #(.HYBRID(1'b0)) dut_ci (
    .a(a), .b(b), .cin(cin), .sum(s_ci), .cout(c_ci));
  cska_datapath #(.W(26), .NUM_STAGES(11), .STAGE_SIZES(SZ26), .NUCLEUS(7)) dut_26 (
    .a(a[25:0]), .b(b[25:0]), .cin(cin), .sum(s_26), .cout(c_26));
  cska_datapath #(.NUM_STAGES(8), .STAGE_SIZES(SZFSS), .HYBRID(1'b0)) dut_fss (
    .a(a), .b(b), .cin(cin), .sum(s_fss), .cout(c_fss));

  task automatic apply(input logic [31:0] ta, tb_, input logic tc);
    logic [32:0] e32;
    logic [26:0] e26;
    a = ta; b = tb_; cin = tc;
    #1;
    e32 = {1'b0, ta} + {1'b0, tb_} + 33'(tc);
    e26 = {1'b0, ta[25:0]} + {1'b0, tb_[25:0]} + 27'(tc);
    checks += 5;
    if ({c_bk, s_bk} != e32) begin failures++; if (failures < 10) $display("FAIL bk %h+%h+%b = %b_%h", ta, tb_, tc, c_bk, s_bk); end
    if ({c_ks, s_ks} != e32) begin failures++; if (failures < 10) $display("FAIL ks %h+%h+%b", ta, tb_, tc); end
    if ({c_ci, s_ci} != e32) begin failures++; if (failures < 10) $display("FAIL ci %h+%h+%b", ta, tb_, tc); end
    if ({c_fss, s_fss} != e32) begin failures++; if (failures < 10) $display("FAIL fss %h+%h+%b", ta, tb_, tc); end
    if ({c_26, s_26} != e26) begin failures++; if (failures < 10) $display("FAIL 26 %h+%h+%b", ta, tb_, tc); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb, mask;
    // Directed patterns.
    apply(32'h0, 32'h0, 1'b0);
    apply(32'h0, 32'h0, 1'b1);
    apply(32'hFFFF_FFFF, 32'h0, 1'b1);          // carry ripples through every stage
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);   // all propagate
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    apply(32'h0000_0001, 32'hFFFF_FFFF, 1'b0);   // generate at bit 0 skips all
    for (int k = 0; k < 32; k++) begin
      // Generate at bit k, everything above propagates.
      ra = 32'hFFFF_FFFF << k;
      rb = 32'h1 << k;
      apply(ra, rb, 1'b0);
      apply(~ra, 32'h1 << k, 1'b1);
      apply(32'h1 << k, 32'h1 << k, 1'b0);
    end
    // Random operands; in half of them random bit ranges are made to propagate.
    for (int n = 0; n < 200000; n++) begin
      ra = $urandom; rb = $urandom;
      if (n % 2 == 1) begin
        mask = $urandom & $urandom;
        mask = mask | (32'hFFFF_FFFF << ($urandom % 32));
        rb = (rb & ~mask) | (~ra & mask);
      end
      apply(ra, rb, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
