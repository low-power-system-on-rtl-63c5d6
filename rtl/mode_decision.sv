// Adaptive mode decision: which intra modes are worth running for this block.
//
// The edge and content flags of the block choose one mode family:
//   smooth                                    -> planar and DC (modes 0, 1)
//   not smooth, horizontal edge only          -> angular modes 2..17
//   not smooth, vertical edge only            -> angular modes 18..34
//   otherwise (both edges, or no edge and not -> all 35 modes
//   smooth, detailed or not)
// mode_en_o has one bit per mode; only predictors whose bit is set are given data,
// the others see a constant input and do not toggle. The three families and their
// link to smooth / horizontal-edge / vertical-edge blocks follow the design
// description; the priority of the smooth flag and the fallback to all 35 modes
// when the flags do not single out one family are this design's choices.
//
// Purely combinational.
module mode_decision
  import h265_pkg::*;
(
  input  logic        smooth,
  input  logic        detailed,
  input  logic        horizontal_edge,
  input  logic        vertical_edge,
  output mode_group_e group_o,
  output logic [NUM_INTRA_MODES-1:0] mode_en_o
);

  always_comb begin
    // The detailed flag only ever leads to the all-modes fallback: it is kept as
    // an input so the decision is visible in one place.
    if (smooth && !detailed)                  group_o = GRP_SMOOTH;
    else if (horizontal_edge && !vertical_edge) group_o = GRP_HORIZ;
    else if (vertical_edge && !horizontal_edge) group_o = GRP_VERT;
    else                                        group_o = GRP_ALL;

    for (int m = 0; m < int'(NUM_INTRA_MODES); m++) begin
      unique case (group_o)
        GRP_SMOOTH: mode_en_o[m] = (m <= 1);
        GRP_HORIZ:  mode_en_o[m] = (m >= 2 && m <= 17);
        GRP_VERT:   mode_en_o[m] = (m >= 18);
        default:    mode_en_o[m] = 1'b1;
      endcase
    end
  end

endmodule
