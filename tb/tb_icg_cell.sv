// Self-checking testbench of icg_cell: the gated clock must pulse exactly in the
// cycles whose enable was high at the rising edge, never be high while clk is
// low, ignore enable changes during the high phase, and run when test_en is set.
module tb_icg_cell;
  logic clk = 0, en = 0, te = 0, gclk;
  int checks = 0, failures = 0;
  int edges = 0;

  icg_cell dut (.clk(clk), .en_i(en), .test_en_i(te), .gclk_o(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) edges++;

  // never high while clk is low
  always @(gclk or clk) begin
    #0;
    if (gclk && !clk) begin
      failures++;
      $display("FAIL gclk high while clk low at %0t", $time);
    end
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_edges = 0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      int edges0;
      logic e, t;
      e = 1'($urandom_range(0, 1));
      t = (n % 37 == 0);
      en = e; te = t;             // set in the low phase
      edges0 = edges;
      @(posedge clk); #2;
      if ($urandom_range(0, 1)) en = ~en;   // change in the high phase: no effect
      @(negedge clk);
      checks++;
      if ((edges - edges0) != ((e | t) ? 1 : 0)) begin
        failures++;
        $display("FAIL cycle %0d en=%0b te=%0b: %0d gated edges", n, e, t, edges - edges0);
      end
      if (e | t) exp_edges++;
    end
    checks++;
    if (edges != exp_edges) begin
      failures++;
      $display("FAIL total gated edges %0d expected %0d", edges, exp_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
