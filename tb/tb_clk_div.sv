// tb_clk_div: checks the divider at its default (80, i.e. 300 kHz from
// 24 MHz) and at 6: period DIVIDER clocks, high for DIVIDER/2 - 1 of them.
// The count starts at 0 after reset, so the first period is DIVIDER + 1
// clocks and is not checked.
module tb_clk_div;
  logic clk = 1'b0, resetn = 1'b0;
  logic out[2];
  int checks = 0, failures = 0;
  always #20.833 clk = ~clk;

  clk_div dut80 (.clk(clk), .resetn(resetn), .clk_out(out[0]));
  clk_div #(.DIVIDER(6)) dut6 (.clk(clk), .resetn(resetn), .clk_out(out[1]));

  localparam int DIV[2] = '{80, 6};

  // per output: clocks since the last rising edge and high clocks in them
  int  per[2] = '{0, 0}, hi[2] = '{0, 0}, periods[2] = '{0, 0};
  logic prev[2] = '{1'b0, 1'b0};
  int rises[2] = '{0, 0};  // the first period after reset is one clock longer

  always @(posedge clk) if (resetn) begin
    for (int k = 0; k < 2; k++) begin
      if (out[k] && !prev[k]) begin
        if (rises[k] >= 2) begin
          checks += 2;
          periods[k]++;
          if (per[k] != DIV[k]) begin
            failures++;
            $display("FAIL: divider %0d period %0d", DIV[k], per[k]);
          end
          if (hi[k] != DIV[k] / 2 - 1) begin
            failures++;
            $display("FAIL: divider %0d high for %0d", DIV[k], hi[k]);
          end
        end
        rises[k]++;
        per[k] = 1;
        hi[k] = 1;
      end else begin
        per[k]++;
        if (out[k]) hi[k]++;
      end
      prev[k] = out[k];
    end
  end

  initial begin
    #200 resetn = 1'b1;
    repeat (5 * 80 + 5) @(posedge clk);
    if (periods[0] < 4 || periods[1] < 50) begin
      failures++;
      $display("FAIL: too few periods %0d %0d", periods[0], periods[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
