// Adaptive 4x4 intra prediction engine.
//
// One block per cycle. The current (original) block cur_i is classified by the
// edge detector and the content analyser; the mode decision turns the flags into a
// set of candidate modes. All 35 single-mode predictors exist side by side, each
// followed by its own SAD unit against cur_i, but only the candidates receive the
// reference pixels and the current block: the inputs of the others are forced to
// zero so they do not switch. Among the candidates the mode with the smallest SAD
// wins, the lower mode number on a tie. Its number, its SAD, its predicted block
// and the classification are registered and appear one clock after valid_i, with
// valid_o. Parallel predictors for all 35 modes, SAD as the cost and executing only
// the modes the classification asks for follow the design description; the single
// register stage, the tie rule and zero-forcing idle predictors are this design's.
//
// Interface: ref_i carries top[0..7] in bytes 0..7 and left[0..7] in bytes 8..15
// (see intra_pred_4x4). The clock may be a gated clock: the registers use an
// asynchronous active-low reset so they reset whether or not the clock runs.
module adaptive_intra
  import h265_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [127:0] cur_i,
  input  logic [127:0] ref_i,
  output logic         valid_o,
  output mode_t        best_mode_o,
  output sad_t         best_sad_o,
  output logic [127:0] pred_o,
  output mode_group_e  group_o,
  output logic [NUM_INTRA_MODES-1:0] mode_en_o,
  output logic         smooth_o,
  output logic         detailed_o,
  output logic         horizontal_edge_o,
  output logic         vertical_edge_o
);

  logic        h_edge, v_edge, smooth, detailed;
  logic [20:0] variance;
  mode_group_e group;
  logic [NUM_INTRA_MODES-1:0] mode_en;

  edge_detect u_edge (
    .block_i(cur_i), .horizontal_edge(h_edge), .vertical_edge(v_edge)
  );

  content_analysis u_content (
    .block_i(cur_i), .variance_o(variance), .smooth(smooth), .detailed(detailed)
  );

  mode_decision u_decide (
    .smooth(smooth), .detailed(detailed),
    .horizontal_edge(h_edge), .vertical_edge(v_edge),
    .group_o(group), .mode_en_o(mode_en)
  );

  logic [127:0] pred [NUM_INTRA_MODES];
  sad_t         sad  [NUM_INTRA_MODES];

  for (genvar m = 0; m < int'(NUM_INTRA_MODES); m++) begin : g_mode
    logic [127:0] ref_iso, cur_iso;
    // Operand isolation: an unselected mode sees constant zero inputs.
    assign ref_iso = mode_en[m] ? ref_i : '0;
    assign cur_iso = mode_en[m] ? cur_i : '0;

    intra_pred_4x4 u_pred (
      .mode_i(mode_t'(m)), .ref_i(ref_iso), .pred_o(pred[m])
    );
    sad4x4 u_sad (
      .a_i(pred[m]), .b_i(cur_iso), .sad_o(sad[m])
    );
  end

  mode_t        win_mode;
  sad_t         win_sad;
  logic [127:0] win_pred;

  always_comb begin
    logic found;
    found    = 1'b0;
    win_mode = '0;
    win_sad  = '1;
    win_pred = '0;
    for (int m = 0; m < int'(NUM_INTRA_MODES); m++) begin
      if (mode_en[m] && (!found || sad[m] < win_sad)) begin
        found    = 1'b1;
        win_mode = mode_t'(m);
        win_sad  = sad[m];
        win_pred = pred[m];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o           <= 1'b0;
      best_mode_o       <= '0;
      best_sad_o        <= '0;
      pred_o            <= '0;
      group_o           <= GRP_SMOOTH;
      mode_en_o         <= '0;
      smooth_o          <= 1'b0;
      detailed_o        <= 1'b0;
      horizontal_edge_o <= 1'b0;
      vertical_edge_o   <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        best_mode_o       <= win_mode;
        best_sad_o        <= win_sad;
        pred_o            <= win_pred;
        group_o           <= group;
        mode_en_o         <= mode_en;
        smooth_o          <= smooth;
        detailed_o        <= detailed;
        horizontal_edge_o <= h_edge;
        vertical_edge_o   <= v_edge;
      end
    end
  end

`ifndef SYNTHESIS
  // Every block runs at least one mode, and the winner is one of the enabled modes.
  a_some_mode: assert property (@(posedge clk) disable iff (!rst_n)
                                valid_i |-> (mode_en != '0));
  a_win_enabled: assert property (@(posedge clk) disable iff (!rst_n)
                                  valid_i |-> mode_en[win_mode]);
  // A result follows every accepted block on the next edge.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              valid_i |=> valid_o);
`endif

endmodule
