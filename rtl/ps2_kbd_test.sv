// ps2_kbd_test: keyboard demonstration design for the DE1 board.
//
// A kbdex_ctrl instance reads the PS/2 keyboard. The board shows the 16-bit
// code of the key in the first slot (see SLOT_SELECT) on HEX3..HEX0 (0000 when none) and
// key_on on LEDG[7:5]. While no key is held, a light runs back and forth
// across the keyboard's three lock LEDs, one step per period of a divided
// clock (5 Hz with the defaults), which makes the controller send an ED
// lights command to the keyboard at each step.
// KEY[0] (active low) is reset, KEY[1] is the controller's enable (high
// while the button is not pressed). Displays are active low; LEDs not
// listed are held off.
//
// The rotator's bit i goes to keyboard light input bit: 0 -> Scroll Lock,
// 1 -> Caps Lock, 2 -> Num Lock, so on a standard keyboard (Num, Caps,
// Scroll from left to right) the light sweeps across in order.
//
// With SLOT_SELECT = 1 (the exercise proposed for this example) the
// switches SW[1:0] pick which slot is displayed: 0, 1, 2, or 3 for none.
// With the default SLOT_SELECT = 0 the switches are ignored and slot 0 is
// shown, as in the example itself.
//
// Interface: PS/2 pins split into line levels in and pull-down enables out.
// The wiring, the 5 Hz step and the light pattern follow the keyboard
// example; the unused board inputs CLOCK_27 and CLOCK_50 are left out.
module ps2_kbd_test #(
  parameter int unsigned CLKFREQ = 24000,            // kHz
  parameter int unsigned HZ_DIV  = 24000000 / 5,     // 24 MHz / 5 Hz
  parameter bit          SLOT_SELECT = 1'b0           // 1: SW[1:0] picks the slot shown
) (
  input  logic [1:0] CLOCK_24,
  input  logic [3:0] KEY,
  input  logic [9:0] SW,
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

  logic        clk, resetn, clockhz, clockhz_q, step;
  logic [2:0]  lights, key_on;
  logic [47:0] key_code;
  logic [15:0] key0;

  assign clk    = CLOCK_24[0];
  assign resetn = KEY[0];

  kbdex_ctrl #(.CLKFREQ(CLKFREQ)) u_kbd (
    .clk        (clk),
    .en         (KEY[1]),
    .resetn     (resetn),
    .ps2_clk_i  (PS2_CLK_I),
    .ps2_data_i (PS2_DAT_I),
    .ps2_clk_oe (PS2_CLK_OE),
    .ps2_data_oe(PS2_DAT_OE),
    .lights     ({lights[1], lights[2], lights[0]}),
    .key_on     (key_on),
    .key_code   (key_code)
  );

  key_slot_mux u_sel (
    .key_code(key_code),
    .sel     (SLOT_SELECT ? SW[1:0] : 2'd0),
    .code    (key0)
  );

  conv_7seg u_hex0 (.digit(key0[3:0]),   .seg(HEX0));
  conv_7seg u_hex1 (.digit(key0[7:4]),   .seg(HEX1));
  conv_7seg u_hex2 (.digit(key0[11:8]),  .seg(HEX2));
  conv_7seg u_hex3 (.digit(key0[15:12]), .seg(HEX3));

  assign LEDG = {key_on, 5'b00000};
  assign LEDR = '0;

  clk_div #(.DIVIDER(HZ_DIV)) u_hz (
    .clk    (clk),
    .resetn (resetn),
    .clk_out(clockhz)
  );

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) clockhz_q <= 1'b0;
    else         clockhz_q <= clockhz;
  end
  assign step = clockhz & ~clockhz_q;

  kbd_lights_rotator u_rot (
    .clk   (clk),
    .resetn(resetn),
    .step  (step),
    .key_on(key_on),
    .lights(lights)
  );

  logic unused;
  assign unused = CLOCK_24[1] ^ (^KEY[3:2]) ^ (^SW[9:2]) ^ (SLOT_SELECT ? 1'b0 : ^SW[1:0]);

endmodule
