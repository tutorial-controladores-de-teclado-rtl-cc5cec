// mouse_ctrl: PS/2 mouse controller with scroll-wheel detection.
//
// How it works
//   An initialisation sequencer sends eleven commands to the mouse through
//   ps2_iobase, one at a time, each when send_rdy allows it (so at least
//   11 ms apart):
//     FF, F5                        reset, disable reporting
//     F3 200, F3 100, F3 80, F2     the "magic" sample-rate sequence that
//                                   switches a wheel mouse to 4-byte
//                                   packets, then read the device ID
//     F6, F4                        restore defaults, enable reporting
//   After each command it waits for one reply byte, whatever its value,
//   except after F2 (get ID), where it waits for an ID byte of 00 (no wheel)
//   or 03 (wheel) and skips anything else (the FA acknowledge). When the
//   sequence is done the packet decoder is enabled. It takes bytes in order:
//     byte 0  bit0 left, bit1 right, bit2 middle button, bit4 X sign,
//             bit5 Y sign, bit6 X overflow, bit7 Y overflow
//     byte 1  X movement, extended to 9 bits with the X sign bit
//     byte 2  Y movement, extended to 9 bits with the Y sign bit
//     byte 3  wheel movement, low four bits (only if a wheel was found)
//   Outputs update as the bytes arrive; newdata goes low with each byte and
//   high after the last byte of a packet, and stays high until the next
//   packet starts.
//
// Interface
//   PS/2 pins split as in ps2_iobase (line level in, pull-down enable out).
//   en low or resetn low restarts the sequencer and clears the outputs.
//   dx, dy: 9-bit two's complement. wheel: 4-bit two's complement, up is
//   negative. wheel_present: the ID read during initialisation was 03.
//
// The command list, the ID handling and the packet layout follow the
// tutorial's controller. This version's own choices: one clock domain,
// each received byte taken once at the rising edge of odata_rdy (also while
// waiting for a command reply), and the extra wheel_present output.
module mouse_ctrl
  import ps2_pkg::*;
#(
  parameter int unsigned CLKFREQ = 24000  // system clock in kHz, at least 1 MHz
) (
  input  logic       clk,
  input  logic       en,
  input  logic       resetn,
  input  logic       ps2_clk_i,
  input  logic       ps2_data_i,
  output logic       ps2_clk_oe,
  output logic       ps2_data_oe,
  output logic       newdata,
  output logic [2:0] bt_on,
  output logic       ox,
  output logic       oy,
  output logic [8:0] dx,
  output logic [8:0] dy,
  output logic [3:0] wheel,
  output logic       wheel_present
);

  localparam int unsigned NCMD = 11;
  localparam logic [7:0] CMDS [NCMD] = '{
    CMD_RESET, CMD_DISABLE_REPORT,
    CMD_SET_RATE, 8'd200, CMD_SET_RATE, 8'd100, CMD_SET_RATE, 8'd80, CMD_GET_ID,
    CMD_SET_DEFAULTS, CMD_ENABLE_REPORT
  };

  typedef enum logic [2:0] {SETCMD, SEND, WAITACK, NEXTCMD, CLEAR} init_state_t;

  logic       sigsend, sigsendrdy, odata_rdy, odata_rdy_q, rx_new;
  logic [7:0] hdata, ddata;

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
    .odata_rdy  (odata_rdy),
    .odata      (ddata)
  );

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) odata_rdy_q <= 1'b0;
    else         odata_rdy_q <= odata_rdy;
  end
  assign rx_new = odata_rdy & ~odata_rdy_q;

  // ------------------------------------------------ initialisation sequencer
  init_state_t state;
  logic [3:0]  count;
  logic        sigreseting, sigwheel;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      state       <= SETCMD;
      count       <= '0;
      sigwheel    <= 1'b0;
      hdata       <= '0;
      sigsend     <= 1'b0;
      sigreseting <= 1'b1;
    end else if (!en) begin
      state       <= SETCMD;
      count       <= '0;
      sigwheel    <= 1'b0;
      hdata       <= '0;
      sigsend     <= 1'b0;
      sigreseting <= 1'b1;
    end else begin
      hdata       <= '0;
      sigsend     <= 1'b0;
      sigreseting <= 1'b1;
      case (state)
        SETCMD: begin
          hdata <= CMDS[count];
          if (sigsendrdy) state <= SEND;
        end
        SEND: begin
          hdata   <= CMDS[count];
          sigsend <= 1'b1;
          state   <= WAITACK;
        end
        WAITACK: begin
          if (rx_new) begin
            if (CMDS[count] == CMD_GET_ID) begin
              if (ddata == ID_MOUSE) begin
                sigwheel <= 1'b0;
                state    <= NEXTCMD;
              end else if (ddata == ID_WHEEL) begin
                sigwheel <= 1'b1;
                state    <= NEXTCMD;
              end
            end else begin
              state <= NEXTCMD;
            end
          end
        end
        NEXTCMD: begin
          if (count == 4'(NCMD - 1)) begin
            count <= '0;
            state <= CLEAR;
          end else begin
            count <= count + 1'b1;
            state <= SETCMD;
          end
        end
        CLEAR: begin
          sigreseting <= 1'b0;
          count       <= '0;
        end
        default: state <= SETCMD;
      endcase
    end
  end

  assign wheel_present = sigwheel;

  // ------------------------------------------------------- packet decoder
  logic [1:0] pcount;
  logic       xn, yn;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      pcount  <= '0;
      newdata <= 1'b0;
      bt_on   <= '0;
      xn      <= 1'b0;
      yn      <= 1'b0;
      ox      <= 1'b0;
      oy      <= 1'b0;
      dx      <= '0;
      dy      <= '0;
      wheel   <= '0;
    end else if (!en) begin
      pcount  <= '0;
      newdata <= 1'b0;
      bt_on   <= '0;
      xn      <= 1'b0;
      yn      <= 1'b0;
      ox      <= 1'b0;
      oy      <= 1'b0;
      dx      <= '0;
      dy      <= '0;
      wheel   <= '0;
    end else if (rx_new && !sigreseting) begin
      newdata <= 1'b0;
      case (pcount)
        2'd0: begin
          bt_on <= ddata[2:0];
          xn    <= ddata[4];
          yn    <= ddata[5];
          ox    <= ddata[6];
          oy    <= ddata[7];
        end
        2'd1:    dx    <= {xn, ddata};
        2'd2:    dy    <= {yn, ddata};
        default: wheel <= ddata[3:0];
      endcase
      if ((!sigwheel && pcount == 2'd2) || pcount == 2'd3) begin
        pcount  <= '0;
        newdata <= 1'b1;
      end else begin
        pcount <= pcount + 1'b1;
      end
    end
  end

endmodule
