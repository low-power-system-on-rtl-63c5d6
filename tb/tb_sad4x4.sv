// Self-checking testbench of sad4x4: extremes and random block pairs.
module tb_sad4x4;
  import tb_models_pkg::*;
  import h265_pkg::*;

  logic [127:0] a, b;
  sad_t s;
  int checks = 0, failures = 0;

  sad4x4 dut (.a_i(a), .b_i(b), .sad_o(s));

  task automatic check(input int e, input string what);
    #1;
    checks++;
    if (int'(s) != e) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sad=%0d exp %0d", what, a, b, s, e);
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
    a = '0;  b = '0;  check(0, "zero");
    a = '1;  b = '0;  check(4080, "max");
    a = '0;  b = '1;  check(4080, "max swapped");
    a = '0;  b = '0; b[8*5 +: 8] = 8'd7; a[8*9 +: 8] = 8'd3; check(10, "two pixels");
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 4; i++) begin a[32*i +: 32] = $urandom; b[32*i +: 32] = $urandom; end
      check(m_sad(a, b), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
