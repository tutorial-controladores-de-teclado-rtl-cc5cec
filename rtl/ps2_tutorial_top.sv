// ps2_tutorial_top: the two PS/2 demonstration designs side by side.
//
// The mouse example (ps2_mouse_test) and the keyboard example
// (ps2_kbd_test) are independent designs, each meant for a DE1 board with
// its own PS/2 device. They share nothing here: each keeps its own clock,
// push buttons, displays, LEDs and PS/2 pins, prefixed M_ for the mouse
// design and K_ for the keyboard design. See the two modules for what each
// shows and for the timing. PS/2 pins are split into line levels in (_I)
// and open-drain pull-down enables out (_OE). K_SW reaches the keyboard
// design's switches, which it reads only when SLOT_SELECT = 1.
//
// The two designs and their defaults are the lab's examples; putting them
// in one top with prefixed ports is this design's own arrangement.
module ps2_tutorial_top #(
  parameter int unsigned CLKFREQ     = 24000,          // kHz, both designs
  parameter int          SENSIBILITY = 16,
  parameter int unsigned CLK300_DIV  = 80,
  parameter int unsigned HZ_DIV      = 24000000 / 5,
  parameter bit          SLOT_SELECT = 1'b0            // keyboard demo: SW picks slot
) (
  // mouse design
  input  logic [1:0] M_CLOCK_24,
  output logic       M_CLOCK_300,
  input  logic [3:0] M_KEY,
  output logic [6:0] M_HEX0,
  output logic [6:0] M_HEX1,
  output logic [6:0] M_HEX2,
  output logic [6:0] M_HEX3,
  output logic [7:0] M_LEDG,
  output logic [9:0] M_LEDR,
  input  logic       M_PS2_CLK_I,
  input  logic       M_PS2_DAT_I,
  output logic       M_PS2_CLK_OE,
  output logic       M_PS2_DAT_OE,
  // keyboard design
  input  logic [1:0] K_CLOCK_24,
  input  logic [3:0] K_KEY,
  input  logic [9:0] K_SW,
  output logic [6:0] K_HEX0,
  output logic [6:0] K_HEX1,
  output logic [6:0] K_HEX2,
  output logic [6:0] K_HEX3,
  output logic [7:0] K_LEDG,
  output logic [9:0] K_LEDR,
  input  logic       K_PS2_CLK_I,
  input  logic       K_PS2_DAT_I,
  output logic       K_PS2_CLK_OE,
  output logic       K_PS2_DAT_OE
);

  ps2_mouse_test #(
    .CLKFREQ    (CLKFREQ),
    .SENSIBILITY(SENSIBILITY),
    .CLK300_DIV (CLK300_DIV)
  ) u_mouse_test (
    .CLOCK_24  (M_CLOCK_24),
    .CLOCK_300 (M_CLOCK_300),
    .KEY       (M_KEY),
    .HEX0      (M_HEX0),
    .HEX1      (M_HEX1),
    .HEX2      (M_HEX2),
    .HEX3      (M_HEX3),
    .LEDG      (M_LEDG),
    .LEDR      (M_LEDR),
    .PS2_CLK_I (M_PS2_CLK_I),
    .PS2_DAT_I (M_PS2_DAT_I),
    .PS2_CLK_OE(M_PS2_CLK_OE),
    .PS2_DAT_OE(M_PS2_DAT_OE)
  );

  ps2_kbd_test #(
    .CLKFREQ    (CLKFREQ),
    .HZ_DIV     (HZ_DIV),
    .SLOT_SELECT(SLOT_SELECT)
  ) u_kbd_test (
    .CLOCK_24  (K_CLOCK_24),
    .KEY       (K_KEY),
    .SW        (K_SW),
    .HEX0      (K_HEX0),
    .HEX1      (K_HEX1),
    .HEX2      (K_HEX2),
    .HEX3      (K_HEX3),
    .LEDG      (K_LEDG),
    .LEDR      (K_LEDR),
    .PS2_CLK_I (K_PS2_CLK_I),
    .PS2_DAT_I (K_PS2_DAT_I),
    .PS2_CLK_OE(K_PS2_CLK_OE),
    .PS2_DAT_OE(K_PS2_DAT_OE)
  );

endmodule
