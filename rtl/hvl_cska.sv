// hvl_cska: hybrid variable latency carry skip adder (top level).
//
// A W-bit adder whose carry runs through one AOI/OAI skip gate per stage,
// with the largest, middle stage (the nucleus) built as a modified parallel
// prefix adder. The clock period only has to cover the paths that do not pass
// the carry of the lower stages through the whole nucleus; when all nucleus
// bits propagate, the predictor flags the addition and it gets two cycles.
//
// Pipeline: an operand register (a, b, cin) feeds the combinational datapath
// (cska_datapath) and the predictor (vl_predictor); the controller
// (vl_controller) decides when the result register captures the sum.
//   * handshake in: an addition is accepted on a rising edge with
//     in_valid & in_ready. in_ready is low only while a two-cycle addition is
//     in its first cycle.
//   * result: out_valid is high for one cycle with sum, cout and
//     out_two_cycle (the prediction used). No back-pressure on the output.
//   * timing: accepted at edge k, the result is registered at edge k+1 for a
//     one-cycle addition and at edge k+2 for a two-cycle one. One-cycle
//     additions can be issued every cycle.
// The register stages, the handshake and the synchronous active-low reset
// are this design's own choices; the stage structure follows the source.
module hvl_cska
  import cska_pkg::*;
#(
  parameter int unsigned   W                        = DEF_WIDTH,
  parameter int unsigned   NUM_STAGES               = DEF_NUM_STAGES,
  parameter int unsigned   STAGE_SIZES [NUM_STAGES] = DEF_STAGE_SIZES,
  parameter int unsigned   NUCLEUS                  = DEF_NUCLEUS,
  parameter prefix_style_e STYLE                    = PREFIX_BRENT_KUNG
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic         out_valid,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         out_two_cycle
);
  function automatic int unsigned stage_lsb(input int unsigned j);
    int unsigned acc = 0;
    for (int unsigned k = 0; k < j; k++) acc += STAGE_SIZES[k];
    return acc;
  endfunction

  localparam int unsigned NUC_LSB = stage_lsb(NUCLEUS);
  localparam int unsigned NUC_SZ  = STAGE_SIZES[NUCLEUS];

  // Operand register.
  logic         op_valid;
  logic [W-1:0] op_a, op_b;
  logic         op_cin;

  // Datapath, predictor, controller.
  logic [W-1:0] dp_sum;
  logic         dp_cout;
  latency_e     latency;
  logic         capture, stall;

  cska_datapath #(
    .W(W), .NUM_STAGES(NUM_STAGES), .STAGE_SIZES(STAGE_SIZES),
    .NUCLEUS(NUCLEUS), .HYBRID(1'b1), .STYLE(STYLE)
  ) u_dp (
    .a(op_a), .b(op_b), .cin(op_cin), .sum(dp_sum), .cout(dp_cout)
  );

  vl_predictor #(.M(NUC_SZ)) u_pred (
    .a(op_a[NUC_LSB +: NUC_SZ]), .b(op_b[NUC_LSB +: NUC_SZ]), .latency(latency)
  );

  vl_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .op_valid(op_valid), .latency(latency),
    .capture(capture), .stall(stall)
  );

  assign in_ready = ~stall;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op_valid <= 1'b0;
      op_a     <= '0;
      op_b     <= '0;
      op_cin   <= 1'b0;
    end else if (in_valid && in_ready) begin
      op_valid <= 1'b1;
      op_a     <= a;
      op_b     <= b;
      op_cin   <= cin;
    end else if (capture) begin
      op_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      sum           <= '0;
      cout          <= 1'b0;
      out_two_cycle <= 1'b0;
    end else begin
      out_valid <= capture;
      if (capture) begin
        sum           <= dp_sum;
        cout          <= dp_cout;
        out_two_cycle <= (latency == LAT_TWO_CYCLE);
      end
    end
  end

  // Handshake rules: a result is only taken from a held addition, and the
  // input is only blocked while an addition is held.
  a_capture_has_op: assert property (@(posedge clk) disable iff (!rst_n)
    capture |-> op_valid);
  a_stall_has_op: assert property (@(posedge clk) disable iff (!rst_n)
    !in_ready |-> op_valid);
endmodule
