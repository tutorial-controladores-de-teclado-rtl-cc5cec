// mouse_pos_acc: absolute mouse position from relative movement packets.
//
// On each rising edge of newdata (a complete packet from mouse_ctrl) the
// movement is added to a remainder accumulator and the position moves by
// the whole multiples of SENSIBILITY in it:
//     s   = acc + d
//     pos = pos + s / SENSIBILITY     (quotient truncated toward zero)
//     acc = s rem SENSIBILITY         (remainder takes the sign of s)
// for X and Y alike, so slow movements are not lost and a larger
// SENSIBILITY makes the pointer slower. pos is 8 bits and wraps around.
// The result is registered one clock after the newdata edge.
//
// Interface: dx, dy are 9-bit two's complement; x, y are 8-bit two's
// complement positions (shown in hex on the displays). resetn is
// asynchronous, active low, and sets positions and remainders to 0.
//
// The arithmetic and the default SENSIBILITY of 16 follow the mouse example;
// taking newdata as a rising edge in the system clock domain, instead of as
// a clock, is this design's choice.
module mouse_pos_acc #(
  parameter int SENSIBILITY = 16  // raise to decrease sensitivity
) (
  input  logic       clk,
  input  logic       resetn,
  input  logic       newdata,
  input  logic [8:0] dx,
  input  logic [8:0] dy,
  output logic [7:0] x,
  output logic [7:0] y
);

  logic               newdata_q, step;
  logic signed [15:0] xacc, yacc, xsum, ysum;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) newdata_q <= 1'b0;
    else         newdata_q <= newdata;
  end
  assign step = newdata & ~newdata_q;

  assign xsum = xacc + 16'(signed'(dx));
  assign ysum = yacc + 16'(signed'(dy));

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      xacc <= '0;
      yacc <= '0;
      x    <= '0;
      y    <= '0;
    end else if (step) begin
      x    <= x + 8'(xsum / 16'(SENSIBILITY));
      y    <= y + 8'(ysum / 16'(SENSIBILITY));
      xacc <= xsum % 16'(SENSIBILITY);
      yacc <= ysum % 16'(SENSIBILITY);
    end
  end

endmodule
