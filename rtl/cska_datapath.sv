// cska_datapath: variable stage size CI-CSKA adder, optionally hybrid.
//
// The W-bit operands are cut into NUM_STAGES stages of STAGE_SIZES[j] bits,
// least significant stage first.
//   * Stage 0 is a plain ripple carry block fed by the adder's carry input.
//   * Every other stage has an RCA block whose carry input is zero
//     (concatenation), so all blocks add at the same time, an incrementation
//     block that adds the previous stage's carry to the block's intermediate
//     sums, and a skip logic gate that makes the stage carry G + P*C from the
//     block carry-out G, the product P of the stage's propagates and the
//     previous stage's carry C. The carry path therefore runs only through
//     one compound gate per stage.
//   * Skip gates alternate: stages 1, 3, 5, ... (0-based) use AOI and produce
//     the inverted carry, stages 2, 4, ... use OAI on inverted inputs and
//     produce the true carry. The OAI stages take their G and P inverted.
//     Where an incrementation block needs the true carry of an AOI stage an
//     inverter is placed off the carry path.
//   * HYBRID = 1 (default) builds stage NUCLEUS, the largest stage, as the
//     modified parallel prefix adder (mod_ppa) instead of RCA plus
//     incrementation; its group pair (P, G) feeds the stage's skip gate.
//     HYBRID = 0 gives the plain CI-CSKA.
// The stage sizes and the choice of the nucleus follow the source; the two
// stages just above the nucleus are this design's own choice (see cska_pkg).
//
// Interface: a, b (W bits), cin, sum (W bits), cout. Purely combinational.
// W must equal the sum of STAGE_SIZES; the first stage may have any size,
// every other stage at least 1 bit, the nucleus at least 2 bits.
module cska_datapath
  import cska_pkg::*;
#(
  parameter int unsigned   W                        = DEF_WIDTH,
  parameter int unsigned   NUM_STAGES               = DEF_NUM_STAGES,
  parameter int unsigned   STAGE_SIZES [NUM_STAGES] = DEF_STAGE_SIZES,
  parameter int unsigned   NUCLEUS                  = DEF_NUCLEUS,
  parameter bit            HYBRID                   = 1'b1,
  parameter prefix_style_e STYLE                    = PREFIX_BRENT_KUNG
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  // Bit position of the least significant bit of stage j.
  function automatic int unsigned stage_lsb(input int unsigned j);
    int unsigned acc = 0;
    for (int unsigned k = 0; k < j; k++) acc += STAGE_SIZES[k];
    return acc;
  endfunction

  if (stage_lsb(NUM_STAGES) != W) begin : g_bad_width
    $error("cska_datapath: stage sizes do not add up to W");
  end
  if (HYBRID && (NUCLEUS == 0 || NUCLEUS >= NUM_STAGES)) begin : g_bad_nucleus
    $error("cska_datapath: the nucleus must be a stage other than the first");
  end

  // carry_x[j]: stage j's carry-out in the polarity its gate produces
  //             (inverted for odd j, true for even j).
  // carry_t[j]: the same carry in true polarity.
  logic [NUM_STAGES-1:0] carry_x, carry_t;

  for (genvar j = 0; j < NUM_STAGES; j++) begin : g_stg
    localparam int unsigned LSB  = stage_lsb(j);
    localparam int unsigned SZ   = STAGE_SIZES[j];
    localparam bit          IS_OAI = (j % 2 == 0);

    if (j == 0) begin : g_first
      logic unused_p;
      rca_block #(.M(SZ), .HAS_CIN(1'b1)) u_rca (
        .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .ci(cin),
        .z(sum[LSB +: SZ]), .co(carry_x[j]), .p_all(unused_p)
      );
      assign carry_t[j] = carry_x[j];
    end else begin : g_skip_stage
      logic g_stage, p_stage;

      if (HYBRID && j == NUCLEUS) begin : g_ppa
        logic [SZ-1:0] unused_pb;
        mod_ppa #(.M(SZ), .STYLE(STYLE)) u_ppa (
          .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .cin(carry_t[j-1]),
          .s(sum[LSB +: SZ]), .p_grp(p_stage), .g_grp(g_stage),
          .p_bits(unused_pb)
        );
      end else begin : g_rca_inc
        logic [SZ-1:0] z;
        rca_block #(.M(SZ), .HAS_CIN(1'b0)) u_rca (
          .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .ci(1'b0),
          .z(z), .co(g_stage), .p_all(p_stage)
        );
        inc_block #(.M(SZ)) u_inc (
          .z(z), .cin(carry_t[j-1]), .s(sum[LSB +: SZ])
        );
      end

      if (IS_OAI) begin : g_oai
        skip_logic #(.OAI(1'b1)) u_skip (
          .g_x(~g_stage), .p_x(~p_stage), .c_x(carry_x[j-1]), .co_x(carry_x[j])
        );
        assign carry_t[j] = carry_x[j];
      end else begin : g_aoi
        skip_logic #(.OAI(1'b0)) u_skip (
          .g_x(g_stage), .p_x(p_stage), .c_x(carry_x[j-1]), .co_x(carry_x[j])
        );
        assign carry_t[j] = ~carry_x[j];
      end
    end
  end

  assign cout = carry_t[NUM_STAGES-1];
endmodule
