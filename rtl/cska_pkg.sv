// cska_pkg: constants and types shared by the carry skip adder modules.
//
// The default configuration is a 32-bit variable stage size adder with 13
// stages, listed from the least to the most significant stage. The 8-bit stage
// (index 7, counting from 0) is the nucleus stage, the largest one, which the
// hybrid configuration builds as a modified parallel prefix adder. The sizes
// up to and including the nucleus (1,1,1,2,2,3,3,8) and the tail 2,2,1 follow
// the source stage list; the 3,3 just above the nucleus is this design's own
// choice, mirroring the rising side so that the sizes add up to 32 bits.
package cska_pkg;

  // Prefix network style used inside the nucleus stage.
  typedef enum logic [0:0] {
    PREFIX_BRENT_KUNG  = 1'b0,
    PREFIX_KOGGE_STONE = 1'b1
  } prefix_style_e;

  localparam int unsigned DEF_NUM_STAGES = 13;
  localparam int unsigned DEF_STAGE_SIZES [DEF_NUM_STAGES] =
    '{1, 1, 1, 2, 2, 3, 3, 8, 3, 3, 2, 2, 1};
  localparam int unsigned DEF_NUCLEUS    = 7;   // 0-based stage index
  localparam int unsigned DEF_WIDTH      = 32;  // sum of DEF_STAGE_SIZES

  // Result of the variable latency predictor.
  typedef enum logic [0:0] {
    LAT_ONE_CYCLE = 1'b0,
    LAT_TWO_CYCLE = 1'b1
  } latency_e;

endpackage
