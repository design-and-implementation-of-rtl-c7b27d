// skip_logic: carry skip logic of a CI-CSKA stage as one compound gate.
//
// The stage's carry-out is G + P*C, with G the carry-out of the stage's
// zero-carry-in RCA block (or the group generate of the nucleus PPA), P the
// product of the stage's propagate signals and C the previous stage's carry.
// Because the RCA block never waits for C, G is ready early and the gate
// skips both a zero and a one carry.
//
// OAI = 0: AND-OR-Invert. Inputs in true polarity, output inverted:
//          co_x = ~(g_x | (p_x & c_x))            (= ~carry)
// OAI = 1: OR-AND-Invert. Inputs in inverted polarity, output true:
//          co_x = ~(g_x & (p_x | c_x))            (= carry when g_x = ~G,
//                                                   p_x = ~P, c_x = ~C)
// Consecutive stages alternate AOI and OAI so that no inverter sits on the
// carry path.
//
// Interface: g_x, p_x, c_x, co_x (polarity as above). Purely combinational.
module skip_logic #(
  parameter bit OAI = 1'b0
) (
  input  logic g_x,
  input  logic p_x,
  input  logic c_x,
  output logic co_x
);
  if (OAI) begin : g_oai
    assign co_x = ~(g_x & (p_x | c_x));
  end else begin : g_aoi
    assign co_x = ~(g_x | (p_x & c_x));
  end
endmodule
