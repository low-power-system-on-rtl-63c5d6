// Self-checking testbench of edge_detect: directed blocks around the threshold of
// 128, then random blocks of several textures, compared with a Sobel model.
module tb_edge_detect;
  import tb_models_pkg::*;

  logic [127:0] blk;
  logic h, v;
  int checks = 0, failures = 0;

  edge_detect dut (.block_i(blk), .horizontal_edge(h), .vertical_edge(v));

  task automatic check(input logic [1:0] exp, input string what);
    #1;
    checks++;
    if ({h, v} !== exp) begin
      failures++;
      $display("FAIL %s: block=%h got h=%0b v=%0b expected h=%0b v=%0b", what, blk, h, v, exp[1], exp[0]);
    end
  endtask

  function automatic logic [127:0] cols(input int c0, c1, c2, c3);
    blk_t b;
    for (int y = 0; y < 4; y++) begin
      b[y][0] = c0; b[y][1] = c1; b[y][2] = c2; b[y][3] = c3;
    end
    return pack_blk(b);
  endfunction

  function automatic logic [127:0] rows(input int r0, r1, r2, r3);
    blk_t b;
    for (int x = 0; x < 4; x++) begin
      b[0][x] = r0; b[1][x] = r1; b[2][x] = r2; b[3][x] = r3;
    end
    return pack_blk(b);
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk = '0;                      check(2'b00, "flat zero");
    blk = {16{8'd200}};            check(2'b00, "flat 200");
    blk = cols(0, 0, 255, 255);    check(2'b10, "vertical step -> gx");
    blk = rows(0, 0, 255, 255);    check(2'b01, "horizontal step -> gy");
    blk = cols(0, 0, 32, 0);       check(2'b00, "gx exactly 128");
    blk = cols(0, 0, 33, 0);       check(2'b10, "gx 132");
    blk = cols(0, 33, 0, 0);       check(2'b10, "negative gx 132 at x=2");
    blk = rows(0, 0, 32, 0);       check(2'b00, "gy exactly 128");
    blk = rows(0, 0, 0, 33);       check(2'b01, "gy 132 at y=2");
    blk = cols(255, 0, 0, 255);    check(2'b10, "outer columns only");
    // a checkerboard balances both kernels around the centre: mixed result
    for (int i = 0; i < 16; i++) blk[8*i +: 8] = ((i/4 + i%4) % 2) ? 8'd255 : 8'd0;
    check(m_edges(blk, 128), "checkerboard");
    for (int n = 0; n < 3000; n++) begin
      int amp, base;
      amp  = (n % 3 == 0) ? 40 : (n % 3 == 1) ? 120 : 256;
      base = $urandom_range(0, 256 - amp);
      for (int i = 0; i < 16; i++) blk[8*i +: 8] = 8'(base + $urandom_range(0, amp - 1));
      check(m_edges(blk, 128), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
