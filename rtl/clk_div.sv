// clk_div: square-wave clock divider.
//
// A counter runs 1, 2, ..., DIVIDER and wraps to 1, so the output period is
// DIVIDER input clocks. The registered output is high while the count is
// below DIVIDER/2, i.e. for DIVIDER/2 - 1 clocks of each period, and low for
// the rest. With the default DIVIDER = 80 a 24 MHz clock gives 300 kHz; the
// keyboard example uses DIVIDER = 24 MHz / 5 Hz = 4 800 000.
//
// The counting scheme and duty cycle follow the examples' divider
// processes. The asynchronous active-low reset, which restarts the counter
// at 0 as the examples' power-up value does, is this design's addition. The
// output is a plain register; the examples sample it as data in the system
// clock domain rather than using it as a clock.
module clk_div #(
  parameter int unsigned DIVIDER = 80
) (
  input  logic clk,
  input  logic resetn,
  output logic clk_out
);

  localparam int unsigned W = $clog2(DIVIDER + 1);
  logic [W-1:0] count;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else begin
      clk_out <= (count < W'(DIVIDER / 2));
      count   <= (count == W'(DIVIDER)) ? W'(1) : count + 1'b1;
    end
  end

endmodule
