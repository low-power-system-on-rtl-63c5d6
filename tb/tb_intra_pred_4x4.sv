// Self-checking testbench of intra_pred_4x4. Directed checks whose values are
// worked out by hand (pure vertical and horizontal copy, the three 45-degree
// diagonals, DC and two planar pixels), then every mode on the ramp reference
// 00,01,..,0F and on random references against the standard-text model.
module tb_intra_pred_4x4;
  import h265_pkg::*;
  import tb_models_pkg::*;

  mode_t        mode;
  logic [127:0] refv, pred;
  int checks = 0, failures = 0;

  intra_pred_4x4 dut (.mode_i(mode), .ref_i(refv), .pred_o(pred));

  function automatic int pp(input int y, input int x);
    return int'(pred[8*(4*y+x) +: 8]);
  endfunction
  function automatic int tp(input int i);
    return int'(refv[8*i +: 8]);
  endfunction
  function automatic int lf(input int i);
    return int'(refv[64 + 8*i +: 8]);
  endfunction

  task automatic expect_px(input int y, input int x, input int e, input string what);
    checks++;
    if (pp(y, x) != e) begin
      failures++;
      $display("FAIL %s mode %0d (y=%0d,x=%0d): got %0d expected %0d", what, mode, y, x, pp(y, x), e);
    end
  endtask

  task automatic check_model(input string what);
    logic [127:0] e;
    #1;
    e = m_intra(int'(mode), refv);
    checks++;
    if (pred !== e) begin
      failures++;
      $display("FAIL %s mode %0d ref=%h: got %h expected %h", what, mode, refv, pred, e);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) refv[8*i +: 8] = 8'(17 * i + 3);
    mode = 6'd26; #1;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) expect_px(y, x, tp(x), "vertical copy");
    mode = 6'd10; #1;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) expect_px(y, x, lf(y), "horizontal copy");
    mode = 6'd34; #1;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) expect_px(y, x, tp(x + y + 1), "diagonal up-right");
    mode = 6'd2; #1;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) expect_px(y, x, lf(x + y + 1), "diagonal down-left");
    mode = 6'd18; #1;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        expect_px(y, x, (x > y) ? tp(x - y - 1) : (x < y) ? lf(y - x - 1) : (tp(0) + lf(0) + 1) / 2,
                  "diagonal down-right");
    mode = 6'd1; #1;
    // top 3,20,37,54 and left 139,156,173,190: sum 772, (772+4)>>3 = 97
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) expect_px(y, x, 97, "DC");
    mode = 6'd0; #1;
    // (0,0): (3*139 + 1*71 + 3*3 + 1*207 + 4) >> 3 = 708 >> 3 = 88
    expect_px(0, 0, 88, "planar");
    // (3,3): (0*190 + 4*71 + 0*54 + 4*207 + 4) >> 3 = 1116 >> 3 = 139
    expect_px(3, 3, 139, "planar");

    for (int i = 0; i < 16; i++) refv[8*i +: 8] = 8'(i);
    for (int m = 0; m < 35; m++) begin
      mode = mode_t'(m);
      check_model("ramp");
    end
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) refv[32*i +: 32] = $urandom;
      for (int m = 0; m < 35; m++) begin
        mode = mode_t'(m);
        check_model("random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
