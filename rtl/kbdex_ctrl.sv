// kbdex_ctrl: PS/2 keyboard controller that tracks up to three keys held at
// the same time.
//
// How it works
//   Bytes from ps2_iobase (scancode set 2) go through a small decoder FSM:
//     IDLE -> FETCH -> DECODE -> one of
//       RELEASE (byte F0: the next code is a key release)   -> IDLE
//       EXT0    (byte E0: the next code is an extended key) -> IDLE
//       EXT1    (byte E1: Pause prefix, ignored)            -> IDLE
//       CODE    (any other byte: a key code)                -> CLRDP -> IDLE
//   The 16-bit key code is {E0 or 00, byte}. In CODE, a press is written
//   into the first empty slot of three (an all-zero slot is empty) unless it
//   is already held, so typematic repeats and a fourth key are ignored; a
//   release clears the slot holding that code. A release of 0012 or 0059
//   (left shift, right shift) also clears a slot holding E012 or E059, the
//   "fake shift" codes that some extended keys send. In CLRDP the E0 and F0
//   flags are cleared and key_on is refreshed from the slots.
//   Print Screen thus shows as two keys (E012 and E07C) and Pause as 0014
//   and 0077.
//
//   The keyboard lights are set with the ED command. A command sequencer
//   sends ED, waits for the reply (FE: send ED again), sends the light bits,
//   waits for the reply (FE: send them again) and goes idle. It runs after
//   reset, after en returns high, and whenever the lights input differs from
//   the value last sent. While it runs the decoder is held in IDLE, so key
//   bytes that arrive meanwhile are lost.
//
// Interface
//   PS/2 pins split as in ps2_iobase. lights: bit0 Scroll, bit1 Num,
//   bit2 Caps Lock (the bit order of the ED argument byte).
//   key_on[i] is high while slot i holds a key; key_code[16*i +: 16] is the
//   code in slot i (0 when empty). key_code changes at the end of CODE,
//   key_on one clock later, about 6 clocks after the byte's parity bit.
//
// Decoding, slot handling and the ED sequence follow the tutorial's
// controller. This version's own choices: the decoder flags are flip-flops
// instead of SR latches and slot writes and clears happen at the clock edge
// that ends CODE; bytes are taken at the rising edge of odata_rdy; and the
// lights change detector compares with the value last sent, so that a
// steady lights input gives one ED exchange and not a repeating one.
module kbdex_ctrl
  import ps2_pkg::*;
#(
  parameter int unsigned CLKFREQ = 24000  // system clock in kHz, at least 10 MHz
) (
  input  logic        clk,
  input  logic        en,
  input  logic        resetn,
  input  logic        ps2_clk_i,
  input  logic        ps2_data_i,
  output logic        ps2_clk_oe,
  output logic        ps2_data_oe,
  input  logic [2:0]  lights,
  output logic [2:0]  key_on,
  output logic [47:0] key_code
);

  typedef enum logic [2:0] {
    IDLE, FETCH, DECODE, CODE, RELEASE, EXT0, EXT1, CLRDP
  } dec_state_t;

  typedef enum logic [2:0] {
    SETCMD, SEND, WAITACK, SETLIGHTS, SENDVAL, WAITACK1, CLEAR
  } cmd_state_t;

  logic       sigsend, sigsendrdy, sigsending, siguplights;
  logic [7:0] hdata, ps2_code;
  logic       ps2_datardy, datardy_q, rx_new;

  ps2_iobase #(.CLKFREQ(CLKFREQ)) u_io (
    .clk        (clk),
    .en         (en),
    .resetn     (resetn),
    .ps2_clk_i  (ps2_clk_i),
    .ps2_data_i (ps2_data_i),
    .ps2_clk_oe (ps2_clk_oe),
    .ps2_data_oe(ps2_data_oe),
    .idata_rdy  (sigsend),
    .idata      (hdata),
    .send_rdy   (sigsendrdy),
    .odata_rdy  (ps2_datardy),
    .odata      (ps2_code)
  );

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) datardy_q <= 1'b0;
    else         datardy_q <= ps2_datardy;
  end
  assign rx_new = ps2_datardy & ~datardy_q;

  // ------------------------------------------------------------ decoder FSM
  dec_state_t state, nstate;
  logic       newdata;
  logic [7:0] fetchdata;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn)         state <= IDLE;
    else if (sigsending) state <= IDLE;
    else if (en)         state <= nstate;
  end

  always_comb begin
    unique case (state)
      IDLE:    nstate = newdata ? FETCH : IDLE;
      FETCH:   nstate = DECODE;
      DECODE:  nstate = (fetchdata == SC_RELEASE) ? RELEASE :
                        (fetchdata == SC_EXT0)    ? EXT0 :
                        (fetchdata == SC_EXT1)    ? EXT1 : CODE;
      CODE:    nstate = CLRDP;
      default: nstate = IDLE;  // RELEASE, EXT0, EXT1, CLRDP
    endcase
  end

  // A new byte is flagged until the decoder has fetched it.
  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn)                             newdata <= 1'b0;
    else if (sigsending || state == DECODE)  newdata <= 1'b0;
    else if (rx_new)                         newdata <= 1'b1;
  end

  // ---------------------------------------------------------------- datapath
  logic        selE0, relbt;
  logic [15:0] datacode;
  logic [15:0] keys [3];

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn)              fetchdata <= '0;
    else if (state == FETCH)  fetchdata <= ps2_code;
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      selE0 <= 1'b0;
      relbt <= 1'b0;
    end else if (state == CLRDP) begin
      selE0 <= 1'b0;
      relbt <= 1'b0;
    end else begin
      if (state == EXT0)    selE0 <= 1'b1;
      if (state == RELEASE) relbt <= 1'b1;
    end
  end

  assign datacode = {selE0 ? SC_EXT0 : 8'h00, fetchdata};

  // Slot selection for a press, slot clearing for a release
  logic [2:0] key_en, key_clr;
  logic       held;

  always_comb begin
    key_en  = '0;
    key_clr = '0;
    held    = (datacode == keys[0]) || (datacode == keys[1]) || (datacode == keys[2]);
    if (state == CODE) begin
      if (!relbt) begin
        if (!held) begin
          if (keys[0] == '0)      key_en[0] = 1'b1;
          else if (keys[1] == '0) key_en[1] = 1'b1;
          else if (keys[2] == '0) key_en[2] = 1'b1;
        end
      end else begin
        // fake shift releases
        if (datacode == KEY_LSHIFT) begin
          if (keys[0] == KEY_FAKE_SH)      key_clr[0] = 1'b1;
          else if (keys[1] == KEY_FAKE_SH) key_clr[1] = 1'b1;
          else if (keys[2] == KEY_FAKE_SH) key_clr[2] = 1'b1;
        end else if (datacode == KEY_KP_RSHIFT) begin
          if (keys[0] == KEY_FAKE_RSH)      key_clr[0] = 1'b1;
          else if (keys[1] == KEY_FAKE_RSH) key_clr[1] = 1'b1;
          else if (keys[2] == KEY_FAKE_RSH) key_clr[2] = 1'b1;
        end
        // normal release
        if (keys[0] == datacode)      key_clr[0] = 1'b1;
        else if (keys[1] == datacode) key_clr[1] = 1'b1;
        else if (keys[2] == datacode) key_clr[2] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      for (int i = 0; i < 3; i++) keys[i] <= '0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (key_clr[i])     keys[i] <= '0;
        else if (key_en[i]) keys[i] <= datacode;
      end
    end
  end

  assign key_code = {keys[2], keys[1], keys[0]};

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) key_on <= '0;
    else if (state == CLRDP)
      for (int i = 0; i < 3; i++) key_on[i] <= (keys[i] != '0);
  end

  // ------------------------------------------------------ lights sequencer
  cmd_state_t cmdstate;
  logic [2:0] sent_lights;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      cmdstate   <= SETCMD;
      sigsending <= 1'b1;
      sigsend    <= 1'b0;
      hdata      <= '0;
    end else if (!en || siguplights) begin
      cmdstate   <= SETCMD;
      sigsending <= 1'b1;
      sigsend    <= 1'b0;
    end else begin
      sigsend    <= 1'b0;
      sigsending <= 1'b1;
      case (cmdstate)
        SETCMD: begin
          hdata <= CMD_SET_LEDS;
          if (sigsendrdy) cmdstate <= SEND;
        end
        SEND: begin
          sigsend  <= 1'b1;
          cmdstate <= WAITACK;
        end
        WAITACK: begin
          if (rx_new) cmdstate <= (ps2_code == REPLY_RESEND) ? SETCMD : SETLIGHTS;
        end
        SETLIGHTS: begin
          hdata <= {5'b00000, lights};
          if (sigsendrdy) cmdstate <= SENDVAL;
        end
        SENDVAL: begin
          sigsend  <= 1'b1;
          cmdstate <= WAITACK1;
        end
        WAITACK1: begin
          if (rx_new) cmdstate <= (ps2_code == REPLY_RESEND) ? SETLIGHTS : CLEAR;
        end
        CLEAR: sigsending <= 1'b0;
        default: cmdstate <= SETCMD;
      endcase
    end
  end

  // Lights change detector: compares with the value last put in hdata.
  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      sent_lights <= '0;
      siguplights <= 1'b0;
    end else begin
      if (cmdstate == SETLIGHTS) sent_lights <= lights;
      siguplights <= (cmdstate == CLEAR) && en && (lights != sent_lights);
    end
  end

  // A slot never holds the same key twice.
  a_no_duplicate_keys : assert property (
    @(posedge clk) disable iff (!resetn)
      !((keys[0] != '0 && (keys[0] == keys[1] || keys[0] == keys[2])) ||
        (keys[1] != '0 && keys[1] == keys[2])))
    else $error("kbdex_ctrl: a key is held in two slots");

endmodule
