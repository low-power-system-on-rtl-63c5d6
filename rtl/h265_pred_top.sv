// Low-power prediction core of an H.265 encoder: adaptive 4x4 intra prediction and
// hierarchical 4x4 motion estimation, each behind its own clock gate.
//
//   intra path : adaptive_intra classifies the current block (edges, smooth or
//                detailed), runs only the matching family of the 35 intra modes in
//                parallel and returns the mode with the smallest SAD one clock after
//                intra_valid_i.
//   inter path : hier_me searches a 4x4 block in an 8x8 window at full, half and
//                quarter resolution; me_done_o rises 27 clocks after me_start_i.
//   clock gating: an icg_cell in front of each path. The intra clock runs in a cycle
//                with intra_valid_i or a pending intra_valid_o; the motion estimation
//                clock runs while me_start_i or me_busy_o is high. An idle path gets
//                no clock edges at all, so during intra-only work the motion estimator
//                is stopped and vice versa. test_en_i forces both clocks on.
//
// The two prediction engines and gating idle modules off come from the design
// description; deriving the enables from the request and busy signals is this
// design's choice. Both paths may also work at the same time. A host processor
// (not part of this RTL) supplies blocks and reads results through these ports.
// Asynchronous active-low reset. Pixel packing is the one of h265_pkg.
module h265_pred_top
  import h265_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_en_i,
  // intra prediction
  input  logic         intra_valid_i,
  input  logic [127:0] intra_cur_i,
  input  logic [127:0] intra_ref_i,
  output logic         intra_valid_o,
  output mode_t        intra_best_mode_o,
  output sad_t         intra_best_sad_o,
  output logic [127:0] intra_pred_o,
  output mode_group_e  intra_group_o,
  output logic [NUM_INTRA_MODES-1:0] intra_mode_en_o,
  output logic [3:0]   intra_flags_o,      // {smooth, detailed, horizontal_edge, vertical_edge}
  // motion estimation
  input  logic         me_start_i,
  input  logic [127:0] me_cur_i,
  input  logic [511:0] me_ref_i,
  output logic         me_busy_o,
  output logic         me_done_o,
  output logic [2:0]   me_best_x_o,
  output logic [2:0]   me_best_y_o,
  output sad_t         me_min_sad_o,
  output sad_t         me_sad_full_o,
  output sad_t         me_sad_half_o,
  output sad_t         me_sad_quarter_o,
  // clock gate status
  output logic         intra_clk_en_o,
  output logic         me_clk_en_o
);

  logic intra_gclk, me_gclk;

  assign intra_clk_en_o = intra_valid_i | intra_valid_o;
  assign me_clk_en_o    = me_start_i | me_busy_o;

  icg_cell u_icg_intra (
    .clk(clk), .en_i(intra_clk_en_o), .test_en_i(test_en_i), .gclk_o(intra_gclk)
  );

  icg_cell u_icg_me (
    .clk(clk), .en_i(me_clk_en_o), .test_en_i(test_en_i), .gclk_o(me_gclk)
  );

  adaptive_intra u_intra (
    .clk               (intra_gclk),
    .rst_n             (rst_n),
    .valid_i           (intra_valid_i),
    .cur_i             (intra_cur_i),
    .ref_i             (intra_ref_i),
    .valid_o           (intra_valid_o),
    .best_mode_o       (intra_best_mode_o),
    .best_sad_o        (intra_best_sad_o),
    .pred_o            (intra_pred_o),
    .group_o           (intra_group_o),
    .mode_en_o         (intra_mode_en_o),
    .smooth_o          (intra_flags_o[3]),
    .detailed_o        (intra_flags_o[2]),
    .horizontal_edge_o (intra_flags_o[1]),
    .vertical_edge_o   (intra_flags_o[0])
  );

  hier_me u_me (
    .clk           (me_gclk),
    .rst_n         (rst_n),
    .start_i       (me_start_i),
    .cur_i         (me_cur_i),
    .ref_i         (me_ref_i),
    .busy_o        (me_busy_o),
    .done_o        (me_done_o),
    .best_x_o      (me_best_x_o),
    .best_y_o      (me_best_y_o),
    .min_sad_o     (me_min_sad_o),
    .sad_full_o    (me_sad_full_o),
    .sad_half_o    (me_sad_half_o),
    .sad_quarter_o (me_sad_quarter_o)
  );

endmodule
