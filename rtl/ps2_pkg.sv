// ps2_pkg: constants shared by the PS/2 host controllers.
//
// Holds the PS/2 command and reply bytes used by the mouse and keyboard
// controllers, the keyboard scancode prefixes, and the odd-parity helper used
// on both the receive and the transmit path. The byte values are the standard
// PS/2 ones that the controllers rely on.
package ps2_pkg;

  // Host-to-device commands
  localparam logic [7:0] CMD_RESET          = 8'hFF;
  localparam logic [7:0] CMD_DISABLE_REPORT = 8'hF5;
  localparam logic [7:0] CMD_SET_RATE       = 8'hF3;
  localparam logic [7:0] CMD_GET_ID         = 8'hF2;
  localparam logic [7:0] CMD_SET_DEFAULTS   = 8'hF6;
  localparam logic [7:0] CMD_ENABLE_REPORT  = 8'hF4;
  localparam logic [7:0] CMD_SET_LEDS       = 8'hED;

  // Device-to-host replies
  localparam logic [7:0] REPLY_ACK    = 8'hFA;
  localparam logic [7:0] REPLY_RESEND = 8'hFE;
  localparam logic [7:0] ID_MOUSE     = 8'h00;  // plain 3-button mouse
  localparam logic [7:0] ID_WHEEL     = 8'h03;  // mouse with scroll wheel

  // Keyboard scancode set 2 prefixes
  localparam logic [7:0] SC_RELEASE = 8'hF0;
  localparam logic [7:0] SC_EXT0    = 8'hE0;
  localparam logic [7:0] SC_EXT1    = 8'hE1;

  // Left shift make code and the two extended keys whose release may be
  // reported as a bare "fake shift" release (see kbdex_ctrl)
  localparam logic [15:0] KEY_LSHIFT    = 16'h0012;
  localparam logic [15:0] KEY_FAKE_SH   = 16'hE012;
  localparam logic [15:0] KEY_KP_RSHIFT = 16'h0059;
  localparam logic [15:0] KEY_FAKE_RSH  = 16'hE059;

  // PS/2 frames carry odd parity: the parity bit makes the count of ones in
  // the eight data bits plus parity odd.
  function automatic logic odd_parity(input logic [7:0] d);
    return ~(^d);
  endfunction

endpackage
