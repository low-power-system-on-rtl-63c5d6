// Self-checking testbench of adaptive_intra: blocks of all four texture classes,
// first one at a time and then back to back, each result compared one clock after
// its valid with the model: classification, enabled mode set, winning mode (lowest
// SAD among the enabled modes, lower mode on a tie), its SAD and its prediction.
module tb_adaptive_intra;
  import h265_pkg::*;
  import tb_models_pkg::*;
  import tb_blockgen_pkg::*;

  logic clk = 0, rst_n = 0, vin = 0;
  logic [127:0] cur, refv;
  logic vout;
  mode_t bm;
  sad_t bs;
  logic [127:0] pred;
  mode_group_e grp;
  logic [34:0] men;
  logic sm, de, he, ve;
  int checks = 0, failures = 0;
  int group_seen [4];

  always #5 clk = ~clk;

  adaptive_intra dut (.clk(clk), .rst_n(rst_n), .valid_i(vin), .cur_i(cur), .ref_i(refv),
                      .valid_o(vout), .best_mode_o(bm), .best_sad_o(bs), .pred_o(pred),
                      .group_o(grp), .mode_en_o(men), .smooth_o(sm), .detailed_o(de),
                      .horizontal_edge_o(he), .vertical_edge_o(ve));

  typedef struct {
    logic [127:0] cur, refv;
  } job_t;

  task automatic check_result(input job_t j);
    int g = m_group(j.cur);
    int bestm = -1, bests = 1 << 30;
    logic [1:0] e = m_edges(j.cur, 128);
    int v = m_variance(j.cur);
    for (int m = 0; m < 35; m++)
      if (m_mode_in_group(m, g)) begin
        int s = m_sad(m_intra(m, j.refv), j.cur);
        if (s < bests) begin bests = s; bestm = m; end
      end
    group_seen[g]++;
    checks++;
    if (!vout || int'(grp) != g || int'(bm) != bestm || int'(bs) != bests ||
        pred !== m_intra(bestm, j.refv) || {he, ve} !== e || sm !== (v < 1000) ||
        de !== (v > 5000)) begin
      failures++;
      $display("FAIL cur=%h ref=%h: valid=%0b group %0d/%0d mode %0d/%0d sad %0d/%0d",
               j.cur, j.refv, vout, grp, g, bm, bestm, bs, bests);
    end
    for (int m = 0; m < 35; m++) begin
      checks++;
      if (men[m] !== m_mode_in_group(m, g)) begin
        failures++;
        $display("FAIL mode enable %0d", m);
      end
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
    job_t q [$];
    cur = '0; refv = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // one at a time: result exactly one clock after valid
    for (int n = 0; n < 200; n++) begin
      job_t j;
      @(negedge clk);
      j.cur  = gen_block(n % 4);
      j.refv = gen_ref(j.cur);
      cur = j.cur; refv = j.refv; vin = 1;
      @(negedge clk);
      vin = 0;
      cur = '0; refv = '0;
      check_result(j);
      @(negedge clk);
      checks++;
      if (vout) begin failures++; $display("FAIL valid_o stuck high"); end
    end
    // back to back, one block every clock
    for (int n = 0; n < 200; n++) begin
      job_t j;
      @(negedge clk);
      if (q.size() > 0) check_result(q.pop_front());
      j.cur  = gen_block($urandom_range(0, 3));
      j.refv = gen_ref(j.cur);
      cur = j.cur; refv = j.refv; vin = 1;
      q.push_back(j);
    end
    @(negedge clk);
    vin = 0;
    check_result(q.pop_front());
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (group_seen[g] == 0) begin failures++; $display("FAIL mode family %0d never exercised", g); end
    end
    $display("mode families seen: smooth %0d horizontal %0d vertical %0d all %0d",
             group_seen[0], group_seen[1], group_seen[2], group_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
