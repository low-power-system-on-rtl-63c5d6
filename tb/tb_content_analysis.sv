// Self-checking testbench of content_analysis: exact threshold cases (a single
// outstanding pixel gives an energy of 2*d^2) and random blocks against a model.
module tb_content_analysis;
  import tb_models_pkg::*;

  logic [127:0] blk;
  logic [20:0]  var_o;
  logic smooth, detailed;
  int checks = 0, failures = 0;

  content_analysis dut (.block_i(blk), .variance_o(var_o), .smooth(smooth), .detailed(detailed));

  task automatic check(input string what);
    int e;
    #1;
    e = m_variance(blk);
    checks++;
    if (int'(var_o) != e || smooth !== (e < 1000) || detailed !== (e > 5000)) begin
      failures++;
      $display("FAIL %s: block=%h var=%0d exp %0d smooth=%0b detailed=%0b", what, blk, var_o, e, smooth, detailed);
    end
  endtask

  task automatic expect_flags(input logic s, input logic d, input int e, input string what);
    #1;
    checks++;
    if (smooth !== s || detailed !== d || int'(var_o) != e) begin
      failures++;
      $display("FAIL %s: var=%0d smooth=%0b detailed=%0b", what, var_o, smooth, detailed);
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
    blk = '0;             expect_flags(1, 0, 0, "flat");
    blk = '0; blk[7:0] = 8'd22; expect_flags(1, 0, 968,  "2*22^2");
    blk = '0; blk[7:0] = 8'd23; expect_flags(0, 0, 1058, "2*23^2");
    blk = '0; blk[7:0] = 8'd50; expect_flags(0, 0, 5000, "2*50^2 = 5000 not detailed");
    blk = '0; blk[7:0] = 8'd51; expect_flags(0, 1, 5202, "2*51^2");
    // the last row / column pixel alone only counts through its neighbour
    blk = '0; blk[8*15 +: 8] = 8'd200; expect_flags(1, 0, 0, "bottom-right pixel unused");
    for (int i = 0; i < 16; i++) blk[8*i +: 8] = ((i/4 + i%4) % 2) ? 8'd255 : 8'd0;
    expect_flags(0, 1, 18*255*255, "checkerboard maximum");
    for (int n = 0; n < 3000; n++) begin
      int amp, base;
      amp  = (n % 4 == 0) ? 8 : (n % 4 == 1) ? 24 : (n % 4 == 2) ? 60 : 256;
      base = $urandom_range(0, 256 - amp);
      for (int i = 0; i < 16; i++) blk[8*i +: 8] = 8'(base + $urandom_range(0, amp - 1));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
