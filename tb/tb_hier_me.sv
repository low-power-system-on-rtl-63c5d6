// Self-checking testbench of hier_me. A 4x4 block is cut out of an 8x8 window at a
// known position (the corner position 4,4 first), optionally with noise, and the
// search result, all stage SADs and the 27-clock latency are compared with the
// model. Random windows with no planted match and a flat window (every position
// ties, so position 0,0 must win) complete it.
module tb_hier_me;
  import h265_pkg::*;
  import tb_models_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] cur;
  logic [511:0] win;
  logic busy, done;
  logic [2:0] bx, by;
  sad_t min_sad, s_full, s_half, s_quart;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hier_me dut (.clk(clk), .rst_n(rst_n), .start_i(start), .cur_i(cur), .ref_i(win),
               .busy_o(busy), .done_o(done), .best_x_o(bx), .best_y_o(by),
               .min_sad_o(min_sad), .sad_full_o(s_full), .sad_half_o(s_half),
               .sad_quarter_o(s_quart));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(input string what);
    int ex, ey, ef, eh, eq, em, cycles;
    m_me(cur, win, ex, ey, ef, eh, eq, em);
    @(negedge clk) start = 1;
    @(posedge clk);                       // start sampled here
    #1 start = 0;
    cycles = 0;
    chk(busy === 1'b1, {what, ": busy after start"});
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
      if (cycles > 100) break;
    end
    chk(cycles == 27, $sformatf("%s: latency %0d clocks, expected 27", what, cycles));
    chk(int'(bx) == ex && int'(by) == ey,
        $sformatf("%s: best (%0d,%0d) expected (%0d,%0d)", what, bx, by, ex, ey));
    chk(int'(s_full) == ef, $sformatf("%s: full SAD %0d expected %0d", what, s_full, ef));
    chk(int'(s_half) == eh, $sformatf("%s: half SAD %0d expected %0d", what, s_half, eh));
    chk(int'(s_quart) == eq, $sformatf("%s: quarter SAD %0d expected %0d", what, s_quart, eq));
    chk(int'(min_sad) == em, $sformatf("%s: min SAD %0d expected %0d", what, min_sad, em));
    @(posedge clk); #1;
    chk(!busy && !done, {what, ": back to idle"});
  endtask

  task automatic plant(input int px, input int py, input int noise);
    win_t w;
    blk_t b;
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++)
        w[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int v = int'(w[py+y][px+x]) + ((noise > 0) ? $urandom_range(0, noise) : 0);
        b[y][x] = (v > 255) ? 255 : v;
      end
    win = pack_win(w);
    cur = pack_blk(b);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = '0; win = '0;
    repeat (3) @(posedge clk);
    chk(bx == 0 && by == 0 && min_sad == 12'hfff && !busy, "reset values");
    #1 rst_n = 1;
    plant(4, 4, 0);
    run_one("exact match at (4,4)");
    chk(bx == 3'd4 && by == 3'd4 && min_sad == 0, "exact match: position 4,4 and SAD 0");
    win = {64{8'd77}}; cur = {16{8'd70}};
    run_one("flat window, all positions tie");
    chk(bx == 0 && by == 0 && s_full == 16*7 && min_sad == 7, "tie keeps (0,0); quarter stage lowers min to 7");
    for (int n = 0; n < 60; n++) begin
      plant($urandom_range(0, 4), $urandom_range(0, 4), (n % 3) * 6);
      run_one($sformatf("planted #%0d", n));
    end
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) win[32*i +: 32] = $urandom;
      for (int i = 0; i < 4; i++)  cur[32*i +: 32] = $urandom;
      run_one($sformatf("random #%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
