// Workload testbench: the two experiments the design is evaluated with.
//
// 1. Intra mode sweep: the reference pixels 00,01,...,0F are applied and the mode
//    is stepped 0..34, one mode per 100 ns with a 10 ns clock. Each prediction is
//    printed as a 128-bit word (pixel (0,0) in the low byte) and checked against
//    the model. The same reference then goes through the complete core with a
//    smooth, a horizontal-edge, a vertical-edge and a textured block as current
//    block, and the core's winning mode is checked.
// 2. Motion search with the best match in the far corner of the 8x8 window: the
//    current block is cut out of the window at (4,4); the core must report
//    best_x = best_y = 4 with a full-resolution SAD of 0, 27 clocks after start.
module tb_eval_workloads;
  import h265_pkg::*;
  import tb_models_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Stand-alone predictor for the sweep
  mode_t        sweep_mode;
  logic [127:0] sweep_ref, sweep_pred;
  intra_pred_4x4 u_sweep (.mode_i(sweep_mode), .ref_i(sweep_ref), .pred_o(sweep_pred));

  // The complete core
  logic intra_valid_i = 0, me_start = 0;
  logic [127:0] intra_cur, intra_ref, intra_pred, me_cur;
  logic [511:0] me_ref;
  logic intra_valid_o, me_busy, me_done, intra_en, me_en;
  mode_t intra_mode;
  sad_t intra_sad, me_min, me_full, me_half, me_quart;
  mode_group_e intra_group;
  logic [34:0] intra_men;
  logic [3:0] intra_flags;
  logic [2:0] me_bx, me_by;

  h265_pred_top dut (
    .clk(clk), .rst_n(rst_n), .test_en_i(1'b0),
    .intra_valid_i(intra_valid_i), .intra_cur_i(intra_cur), .intra_ref_i(intra_ref),
    .intra_valid_o(intra_valid_o), .intra_best_mode_o(intra_mode), .intra_best_sad_o(intra_sad),
    .intra_pred_o(intra_pred), .intra_group_o(intra_group), .intra_mode_en_o(intra_men),
    .intra_flags_o(intra_flags),
    .me_start_i(me_start), .me_cur_i(me_cur), .me_ref_i(me_ref), .me_busy_o(me_busy),
    .me_done_o(me_done), .me_best_x_o(me_bx), .me_best_y_o(me_by), .me_min_sad_o(me_min),
    .me_sad_full_o(me_full), .me_sad_half_o(me_half), .me_sad_quarter_o(me_quart),
    .intra_clk_en_o(intra_en), .me_clk_en_o(me_en)
  );

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ramp;
    logic [127:0] blocks [4];
    for (int i = 0; i < 16; i++) ramp[8*i +: 8] = 8'(i);
    intra_cur = '0; intra_ref = '0; me_cur = '0; me_ref = '0;

    // 1a. mode sweep
    sweep_ref = ramp;
    for (int m = 0; m < 35; m++) begin
      sweep_mode = mode_t'(m);
      #100;
      $display("mode %2d  pred %h", m, sweep_pred);
      chk(sweep_pred === m_intra(m, ramp), $sformatf("sweep mode %0d", m));
    end

    // 1b. the same reference through the adaptive core
    repeat (2) @(negedge clk);
    rst_n = 1;
    blocks[0] = ramp;                                   // gentle ramp: smooth
    blocks[1] = {4{8'd200, 8'd200, 8'd20, 8'd20}};      // left/right step: strong gx
    blocks[2] = {{8{8'd220}}, {8{8'd10}}};              // top/bottom step: strong gy
    blocks[3] = 128'h0f3a_c2e1_5577_9b04_d3a8_16e0_7c2f_b941;
    for (int k = 0; k < 4; k++) begin
      int g, bm, bs;
      g = m_group(blocks[k]);
      bm = -1;
      bs = 1 << 30;
      for (int m = 0; m < 35; m++)
        if (m_mode_in_group(m, g)) begin
          int s;
          s = m_sad(m_intra(m, ramp), blocks[k]);
          if (s < bs) begin bs = s; bm = m; end
        end
      @(negedge clk);
      intra_cur = blocks[k]; intra_ref = ramp; intra_valid_i = 1;
      @(negedge clk);
      intra_valid_i = 0;
      $display("block %0d: family %0d flags %b best mode %0d SAD %0d", k, intra_group, intra_flags,
               intra_mode, intra_sad);
      chk(intra_valid_o && int'(intra_group) == g && int'(intra_mode) == bm && int'(intra_sad) == bs,
          $sformatf("core on block %0d: mode %0d/%0d", k, intra_mode, bm));
      chk(int'(intra_group) == k, $sformatf("block %0d lands in family %0d", k, intra_group));
    end

    // 2. corner match
    begin
      win_t w;
      blk_t b;
      int n;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          w[y][x] = (37 * y + 11 * x * x + 5) % 256;
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          b[y][x] = w[4+y][4+x];
      me_ref = pack_win(w);
      me_cur = pack_blk(b);
      @(negedge clk) me_start = 1;
      @(negedge clk) me_start = 0;   // start was sampled on the edge just before
      n = 0;
      while (!me_done && n < 100) begin @(negedge clk); n++; end
      $display("ME: best_x %0d best_y %0d full SAD %0d after %0d clocks", me_bx, me_by, me_full, n);
      chk(me_done && me_bx == 3'd4 && me_by == 3'd4 && me_full == 0 && me_min == 0, "corner match at (4,4)");
      chk(n == 27, $sformatf("search took %0d clocks", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
