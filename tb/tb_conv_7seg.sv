// tb_conv_7seg: checks all sixteen glyphs of the seven-segment decoder
// against a table of which segments (a..g) each hex digit lights.
module tb_conv_7seg;
  logic [3:0] digit;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  conv_7seg dut (.digit(digit), .seg(seg));

  // lit segments per digit, written as the letters a..g
  string glyph[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      logic [6:0] exp_on;
      exp_on = '0;
      foreach (glyph[d][k]) exp_on[glyph[d][k] - "a"] = 1'b1;
      digit = 4'(d);
      #1;
      checks++;
      if (seg !== ~exp_on) begin
        failures++;
        $display("FAIL: digit %h seg %b expected %b", d, seg, ~exp_on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
