// End-to-end testbench of h265_pred_top at its default configuration.
//
// Phase 1, intra only: blocks of all four texture classes with idle gaps; the
//   motion estimator must receive no clock edges at all.
// Phase 2, motion estimation only: planted-match and random searches, including the
//   (4,4) corner match; the intra engine must receive no clock edges.
// Phase 3, both at once: intra blocks stream while a search runs.
// Phase 4, test mode: test_en forces both gated clocks on while idle.
// Every result is compared with the models. Each mechanism is counted: the four
// mode families, gated-off clocks of each engine, a coarse stage lowering the
// minimum SAD, overlapping operation and the test override; one that never happens
// counts as a failure.
module tb_h265_pred_top;
  import h265_pkg::*;
  import tb_models_pkg::*;
  import tb_blockgen_pkg::*;

  logic clk = 0, rst_n = 0, test_en = 0;
  logic intra_valid_i = 0;
  logic [127:0] intra_cur, intra_ref;
  logic intra_valid_o;
  mode_t intra_mode;
  sad_t intra_sad;
  logic [127:0] intra_pred;
  mode_group_e intra_group;
  logic [34:0] intra_men;
  logic [3:0] intra_flags;
  logic me_start = 0;
  logic [127:0] me_cur;
  logic [511:0] me_ref;
  logic me_busy, me_done;
  logic [2:0] me_bx, me_by;
  sad_t me_min, me_full, me_half, me_quart;
  logic intra_en, me_en;

  int checks = 0, failures = 0;
  int group_seen [4];
  int intra_gated = 0, me_gated = 0, coarse_lowered = 0, overlap = 0, test_forced = 0;
  int corner_match = 0;

  always #5 clk = ~clk;

  h265_pred_top dut (
    .clk(clk), .rst_n(rst_n), .test_en_i(test_en),
    .intra_valid_i(intra_valid_i), .intra_cur_i(intra_cur), .intra_ref_i(intra_ref),
    .intra_valid_o(intra_valid_o), .intra_best_mode_o(intra_mode), .intra_best_sad_o(intra_sad),
    .intra_pred_o(intra_pred), .intra_group_o(intra_group), .intra_mode_en_o(intra_men),
    .intra_flags_o(intra_flags),
    .me_start_i(me_start), .me_cur_i(me_cur), .me_ref_i(me_ref), .me_busy_o(me_busy),
    .me_done_o(me_done), .me_best_x_o(me_bx), .me_best_y_o(me_by), .me_min_sad_o(me_min),
    .me_sad_full_o(me_full), .me_sad_half_o(me_half), .me_sad_quarter_o(me_quart),
    .intra_clk_en_o(intra_en), .me_clk_en_o(me_en)
  );

  // Count clock edges each engine misses.
  int intra_edges = 0, me_edges = 0, clk_edges = 0;
  always @(posedge dut.intra_gclk) intra_edges++;
  always @(posedge dut.me_gclk)    me_edges++;
  always @(posedge clk) begin
    clk_edges++;
    if (!dut.intra_gclk) intra_gated++;
    if (!dut.me_gclk)    me_gated++;
    if (intra_valid_i && me_busy) overlap++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Checks the intra result for (c, r), sampled in the clock after its valid.
  task automatic check_intra(input logic [127:0] c, input logic [127:0] r);
    int g = m_group(c);
    int bm = -1, bs = 1 << 30;
    for (int m = 0; m < 35; m++)
      if (m_mode_in_group(m, g)) begin
        int s = m_sad(m_intra(m, r), c);
        if (s < bs) begin bs = s; bm = m; end
      end
    group_seen[g]++;
    chk(intra_valid_o && int'(intra_group) == g && int'(intra_mode) == bm &&
        int'(intra_sad) == bs && intra_pred === m_intra(bm, r),
        $sformatf("intra cur=%h: mode %0d/%0d sad %0d/%0d group %0d/%0d",
                  c, intra_mode, bm, intra_sad, bs, intra_group, g));
  endtask

  task automatic intra_one(input int kind);
    logic [127:0] c = gen_block(kind), r = gen_ref(c);
    @(negedge clk);
    intra_cur = c; intra_ref = r; intra_valid_i = 1;
    @(negedge clk);
    intra_valid_i = 0;
    check_intra(c, r);
  endtask

  task automatic me_setup(input int px, input int py, input bit planted);
    win_t w;
    blk_t b;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        w[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        b[y][x] = planted ? w[py+y][px+x] : $urandom_range(0, 255);
    me_ref = pack_win(w);
    me_cur = pack_blk(b);
  endtask

  task automatic me_start_pulse();
    @(negedge clk) me_start = 1;
    @(negedge clk) me_start = 0;
  endtask

  task automatic me_finish();
    int ex, ey, ef, eh, eq, em, n = 0;
    m_me(me_cur, me_ref, ex, ey, ef, eh, eq, em);
    while (!me_done && n < 100) begin @(negedge clk); n++; end
    chk(me_done && int'(me_bx) == ex && int'(me_by) == ey && int'(me_full) == ef &&
        int'(me_half) == eh && int'(me_quart) == eq && int'(me_min) == em,
        $sformatf("ME: best (%0d,%0d)/(%0d,%0d) min %0d/%0d", me_bx, me_by, ex, ey, me_min, em));
    if (em < ef) coarse_lowered++;
    if (me_bx == 3'd4 && me_by == 3'd4 && me_min == 0) corner_match++;
    @(negedge clk);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0, m0;
    intra_cur = '0; intra_ref = '0; me_cur = '0; me_ref = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Phase 1: intra only
    m0 = me_edges;
    for (int n = 0; n < 120; n++) begin
      intra_one(n % 4);
      if (n % 5 == 0) repeat (3) @(negedge clk);
    end
    chk(me_edges == m0, $sformatf("ME clock ran %0d times during intra-only work", me_edges - m0));

    // Phase 2: motion estimation only (one clock lets the last intra valid drop)
    @(negedge clk);
    e0 = intra_edges;
    me_setup(4, 4, 1); me_start_pulse(); me_finish();
    for (int n = 0; n < 30; n++) begin
      me_setup($urandom_range(0, 4), $urandom_range(0, 4), n % 4 != 3);
      me_start_pulse();
      me_finish();
      repeat (2) @(negedge clk);
    end
    chk(intra_edges == e0, $sformatf("intra clock ran %0d times during ME-only work", intra_edges - e0));

    // Phase 3: both at once
    for (int k = 0; k < 5; k++) begin
      me_setup($urandom_range(0, 4), $urandom_range(0, 4), 1);
      me_start_pulse();
      for (int n = 0; n < 10; n++) intra_one($urandom_range(0, 3));
      me_finish();
    end

    // Phase 4: test override while idle
    repeat (3) @(negedge clk);
    e0 = intra_edges; m0 = me_edges;
    test_en = 1;
    repeat (10) @(negedge clk);
    test_en = 0;
    test_forced = intra_edges - e0;
    chk(intra_edges - e0 == 10 && me_edges - m0 == 10, "test_en forces both clocks");
    chk(!intra_valid_o && !me_busy, "idle after test mode");

    for (int g = 0; g < 4; g++) chk(group_seen[g] > 0, $sformatf("mode family %0d exercised", g));
    chk(intra_gated > 0, "intra clock gated off at least once");
    chk(me_gated > 0, "ME clock gated off at least once");
    chk(coarse_lowered > 0, "a coarse stage lowered the minimum SAD");
    chk(corner_match > 0, "match found at (4,4)");
    chk(overlap > 0, "intra and ME overlapped");
    chk(test_forced > 0, "test override used");
    $display("families: smooth %0d horiz %0d vert %0d all %0d | gated clocks: intra %0d me %0d of %0d",
             group_seen[0], group_seen[1], group_seen[2], group_seen[3], intra_gated, me_gated, clk_edges);
    $display("coarse stage lowered min %0d, (4,4) matches %0d, overlap cycles %0d, test-forced edges %0d",
             coarse_lowered, corner_match, overlap, test_forced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
