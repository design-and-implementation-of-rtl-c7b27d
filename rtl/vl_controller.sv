// vl_controller: sequencing of the variable latency adder.
//
// The clock period is set for the short paths of the hybrid adder. While the
// operand register holds an addition (op_valid), the controller reads the
// predictor: a one-cycle addition is captured at the end of its first cycle;
// a two-cycle addition holds the operands for a second cycle (state EXTEND)
// and is captured at the end of that one. `capture` loads the result
// register and frees the operand register; `stall` is high during the first
// cycle of a two-cycle addition and blocks new operands. The two-state
// sequencer is this design's own; the source gives only the one-cycle /
// two-cycle behaviour.
//
// Interface: clk, rst_n (active-low, synchronous), op_valid, latency,
// capture, stall. State changes on the rising clock edge.
module vl_controller
  import cska_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     op_valid,
  input  latency_e latency,
  output logic     capture,
  output logic     stall
);
  typedef enum logic [0:0] {
    S_EVAL   = 1'b0,   // first cycle of an addition (or idle)
    S_EXTEND = 1'b1    // second cycle of a two-cycle addition
  } state_e;

  state_e state, state_nx;

  always_comb begin
    state_nx = state;
    capture  = 1'b0;
    stall    = 1'b0;
    unique case (state)
      S_EVAL: begin
        if (op_valid) begin
          if (latency == LAT_TWO_CYCLE) begin
            stall    = 1'b1;
            state_nx = S_EXTEND;
          end else begin
            capture  = 1'b1;
          end
        end
      end
      S_EXTEND: begin
        capture  = 1'b1;
        state_nx = S_EVAL;
      end
      default: state_nx = S_EVAL;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_EVAL;
    else        state <= state_nx;
  end

  // The second cycle only ever follows a held two-cycle addition.
  a_extend_has_op: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_EXTEND |-> op_valid);
endmodule
