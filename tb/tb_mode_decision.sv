// Self-checking testbench of mode_decision: all 16 flag combinations against the
// expected mode family and the 35-bit enable mask.
module tb_mode_decision;
  import h265_pkg::*;
  import tb_models_pkg::*;

  logic s, d, h, v;
  mode_group_e g;
  logic [34:0] en;
  int checks = 0, failures = 0;

  mode_decision dut (.smooth(s), .detailed(d), .horizontal_edge(h), .vertical_edge(v),
                     .group_o(g), .mode_en_o(en));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int eg;
      {s, d, h, v} = 4'(c);
      #1;
      if (s && !d)       eg = 0;
      else if (h && !v)  eg = 1;
      else if (v && !h)  eg = 2;
      else               eg = 3;
      checks++;
      if (int'(g) != eg) begin
        failures++;
        $display("FAIL flags s=%0b d=%0b h=%0b v=%0b: group %0d exp %0d", s, d, h, v, g, eg);
      end
      for (int m = 0; m < 35; m++) begin
        checks++;
        if (en[m] !== m_mode_in_group(m, eg)) begin
          failures++;
          $display("FAIL flags %0d mode %0d enable %0b", c, m, en[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
