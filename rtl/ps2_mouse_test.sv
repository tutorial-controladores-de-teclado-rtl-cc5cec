// ps2_mouse_test: mouse demonstration design for the DE1 board.
//
// A mouse_ctrl instance reads the PS/2 mouse; mouse_pos_acc turns its
// relative movement into an absolute 8-bit position, scaled down by
// SENSIBILITY. The board shows:
//   HEX3 HEX2   X position (hex)        HEX1 HEX0   Y position (hex)
//   LEDG[7:5]   buttons (middle, right, left)
//   LEDR[9]     X overflow              LEDR[7]     Y overflow
//   LEDG[3:0]   wheel movement of the last packet, binary
// CLOCK_300 is a 300 kHz square wave from the 24 MHz clock.
// KEY[0] (active low) resets everything; the controller is always enabled.
// Displays are active low. LEDs not listed are held off.
//
// Interface: the PS/2 pins are split into line levels in and pull-down
// enables out; on the board each pin is an open-drain pad with a pull-up.
//
// The wiring, SENSIBILITY and the 300 kHz output follow the mouse example.
// The example's other two divided clocks (100 kHz and 1 MHz) drive nothing
// there and are left out, as are the unused board inputs (CLOCK_27,
// CLOCK_50, SW).
module ps2_mouse_test #(
  parameter int unsigned CLKFREQ     = 24000,  // kHz
  parameter int          SENSIBILITY = 16,
  parameter int unsigned CLK300_DIV  = 80      // 24 MHz / 300 kHz
) (
  input  logic [1:0] CLOCK_24,
  output logic       CLOCK_300,
  input  logic [3:0] KEY,
  output logic [6:0] HEX0,
  output logic [6:0] HEX1,
  output logic [6:0] HEX2,
  output logic [6:0] HEX3,
  output logic [7:0] LEDG,
  output logic [9:0] LEDR,
  input  logic       PS2_CLK_I,
  input  logic       PS2_DAT_I,
  output logic       PS2_CLK_OE,
  output logic       PS2_DAT_OE
);

  logic        clk, resetn;
  logic        signewdata, ox, oy, wheel_present;
  logic [2:0]  bt_on;
  logic [3:0]  wheel;
  logic [8:0]  dx, dy;
  logic [7:0]  x, y;
  logic [15:0] hexdata;

  assign clk    = CLOCK_24[0];
  assign resetn = KEY[0];

  mouse_ctrl #(.CLKFREQ(CLKFREQ)) u_mouse (
    .clk          (clk),
    .en           (1'b1),
    .resetn       (resetn),
    .ps2_clk_i    (PS2_CLK_I),
    .ps2_data_i   (PS2_DAT_I),
    .ps2_clk_oe   (PS2_CLK_OE),
    .ps2_data_oe  (PS2_DAT_OE),
    .newdata      (signewdata),
    .bt_on        (bt_on),
    .ox           (ox),
    .oy           (oy),
    .dx           (dx),
    .dy           (dy),
    .wheel        (wheel),
    .wheel_present(wheel_present)
  );

  mouse_pos_acc #(.SENSIBILITY(SENSIBILITY)) u_pos (
    .clk    (clk),
    .resetn (resetn),
    .newdata(signewdata),
    .dx     (dx),
    .dy     (dy),
    .x      (x),
    .y      (y)
  );

  assign hexdata = {x, y};

  conv_7seg u_hex0 (.digit(hexdata[3:0]),   .seg(HEX0));
  conv_7seg u_hex1 (.digit(hexdata[7:4]),   .seg(HEX1));
  conv_7seg u_hex2 (.digit(hexdata[11:8]),  .seg(HEX2));
  conv_7seg u_hex3 (.digit(hexdata[15:12]), .seg(HEX3));

  assign LEDG = {bt_on, 1'b0, wheel};
  assign LEDR = {ox, 1'b0, oy, 7'b0000000};

  clk_div #(.DIVIDER(CLK300_DIV)) u_clk300 (
    .clk    (clk),
    .resetn (resetn),
    .clk_out(CLOCK_300)
  );

  // wheel_present is not shown on the board
  logic unused;
  assign unused = wheel_present ^ CLOCK_24[1] ^ (^KEY[3:1]);

endmodule
