// ps2_iobase: PS/2 host-side line controller shared by the mouse and the
// keyboard controllers.
//
// How it works
//   * The PS/2 clock line is synchronised and filtered: it must stay at a new
//     level for CLKFREQ/150 system clocks (about 6.7 us) before the filtered
//     clock follows it. Each filtered falling edge is one "tick"; the device
//     changes data on the rising edge and the host samples at the tick.
//   * Receive (device to host): an 11-bit frame, start bit, eight data bits
//     LSB first, odd parity, stop bit. The data bits are shifted into odata.
//     At the parity bit the parity is checked; odata_rdy is high from the
//     parity tick to the stop-bit tick (one PS/2 bit time) when it was right.
//     The start and stop bits are not checked. A frame with bad parity is
//     silently dropped.
//   * Transmit (host to device): a rising edge on idata_rdy latches idata and
//     starts a request-to-send. The host pulls the clock low for
//     CLKFREQ/10 + 50 clocks (100 us and a little more), then also pulls data
//     low (start bit) for 50 more clocks, then releases the clock. On each
//     following tick it puts out data bits 0..7, the odd parity bit, releases
//     data for the stop bit, and on the 11th tick (the device's acknowledge
//     bit) the transfer ends. The receiver is held cleared during a transfer.
//   * Pacing: send_rdy falls when a transfer starts and rises again 11 ms
//     (11*CLKFREQ clocks) after it ended. It is high after reset.
//
// Interface
//   The two bidirectional PS/2 pins are split into the line level seen at
//   the pin (ps2_clk_i, ps2_data_i) and an open-drain pull-down enable
//   (ps2_clk_oe, ps2_data_oe: 1 pulls the line low, 0 releases it to the
//   pull-up). The pad itself is outside this module.
//   idata_rdy/idata/send_rdy: raise idata_rdy only while send_rdy is high.
//   odata_rdy/odata: a received byte, see above. en gates the clock filter
//   and odata_rdy. resetn is an asynchronous active-low reset.
//
// The bit-level behaviour, the filter length, the hold times and the 11 ms
// pacing follow the tutorial's controller. This version's own choices: one
// clock domain (edges of the filtered PS/2 clock are detected in the system
// clock domain instead of clocking registers with it), two-flop synchronisers
// on both pins, and open-drain driving of data, so a '1' data bit releases the
// line rather than driving it high.
module ps2_iobase
  import ps2_pkg::odd_parity;
#(
  parameter int unsigned CLKFREQ = 24000  // system clock in kHz
) (
  input  logic       clk,
  input  logic       en,
  input  logic       resetn,
  input  logic       ps2_clk_i,
  input  logic       ps2_data_i,
  output logic       ps2_clk_oe,
  output logic       ps2_data_oe,
  input  logic       idata_rdy,
  input  logic [7:0] idata,
  output logic       send_rdy,
  output logic       odata_rdy,
  output logic [7:0] odata
);

  localparam int unsigned CLKSSTABLE = CLKFREQ / 150;
  localparam int unsigned US100CNT   = CLKFREQ / 10;
  localparam int unsigned SENDWAIT   = 11 * CLKFREQ;
  localparam int unsigned FW = $clog2(CLKSSTABLE + 2);
  localparam int unsigned HW = $clog2(US100CNT + 102);
  localparam int unsigned WW = $clog2(SENDWAIT + 2);

  // ---------------------------------------------------------------- sync
  logic [1:0] clk_sync, data_sync;
  logic       clk_s, data_s;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      clk_sync  <= 2'b11;
      data_sync <= 2'b11;
    end else begin
      clk_sync  <= {clk_sync[0], ps2_clk_i};
      data_sync <= {data_sync[0], ps2_data_i};
    end
  end
  assign clk_s  = clk_sync[1];
  assign data_s = data_sync[1];

  // -------------------------------------------------------- clock filter
  logic [FW-1:0] fcount, rcount;
  logic          trig, trig_q, tick;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      fcount <= '0;
      rcount <= '0;
      trig   <= 1'b0;
    end else if (en) begin
      if (!clk_s) begin
        rcount <= '0;
        if (fcount >= FW'(CLKSSTABLE)) trig <= 1'b1;
        else fcount <= fcount + 1'b1;
      end else begin
        fcount <= '0;
        if (rcount >= FW'(CLKSSTABLE)) trig <= 1'b0;
        else rcount <= rcount + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) trig_q <= 1'b0;
    else         trig_q <= trig;
  end
  assign tick = trig & ~trig_q;

  // ------------------------------------------------------ send request
  logic       req_q, send_start, sending, sendend;
  logic [7:0] hdata;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) req_q <= 1'b0;
    else         req_q <= idata_rdy;
  end
  assign send_start = idata_rdy & ~req_q;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      sending <= 1'b0;
      hdata   <= '0;
    end else if (sendend) begin
      sending <= 1'b0;
      hdata   <= '0;
    end else if (send_start && !sending) begin
      sending <= 1'b1;
      hdata   <= idata;
    end
  end

  // ------------------------------------------------------------ receive
  logic [3:0] rx_count;
  logic [7:0] sdata;
  logic       parchecked;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      rx_count   <= '0;
      sdata      <= '0;
      parchecked <= 1'b0;
    end else if (sending) begin
      rx_count   <= '0;
      sdata      <= '0;
      parchecked <= 1'b0;
    end else if (tick) begin
      if (rx_count >= 4'd1 && rx_count <= 4'd8) sdata[rx_count[2:0] - 3'd1] <= data_s;
      if (rx_count == 4'd9) parchecked <= (odd_parity(sdata) == data_s);
      if (rx_count == 4'd10) begin
        rx_count   <= '0;
        parchecked <= 1'b0;
      end else begin
        rx_count <= rx_count + 1'b1;
      end
    end
  end

  assign odata_rdy = en & parchecked;
  assign odata     = sdata;

  // ------------------------------------------------------- send pacing
  logic [WW-1:0] wcount;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      send_rdy <= 1'b1;
      wcount   <= '0;
    end else if (sending) begin
      send_rdy <= 1'b0;
      wcount   <= '0;
    end else if (wcount == WW'(SENDWAIT)) begin
      send_rdy <= 1'b1;
    end else begin
      wcount <= wcount + 1'b1;
    end
  end

  // ------------------------------------------- clock hold (request-to-send)
  logic [HW-1:0] hcount;
  logic          clk_released, clk_held;

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      hcount       <= '0;
      ps2_clk_oe   <= 1'b0;
      clk_released <= 1'b0;
      clk_held     <= 1'b0;
    end else if (!sending) begin
      hcount       <= '0;
      ps2_clk_oe   <= 1'b0;
      clk_released <= 1'b0;
      clk_held     <= 1'b0;
    end else if (hcount < HW'(US100CNT + 50)) begin
      hcount       <= hcount + 1'b1;
      ps2_clk_oe   <= 1'b1;
      clk_released <= 1'b0;
      clk_held     <= 1'b0;
    end else if (hcount < HW'(US100CNT + 100)) begin
      hcount       <= hcount + 1'b1;
      ps2_clk_oe   <= 1'b1;
      clk_released <= 1'b0;
      clk_held     <= 1'b1;
    end else begin
      ps2_clk_oe   <= 1'b0;
      clk_released <= 1'b1;
      clk_held     <= 1'b0;
    end
  end

  // ------------------------------------------------------------ transmit
  logic [3:0] tx_count;

  assign sendend = sending & clk_released & tick & (tx_count == 4'd10);

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      tx_count    <= '0;
      ps2_data_oe <= 1'b0;
    end else if (!sending) begin
      tx_count    <= '0;
      ps2_data_oe <= 1'b0;
    end else if (clk_held) begin
      tx_count    <= '0;
      ps2_data_oe <= 1'b1;          // start bit
    end else if (clk_released && tick) begin
      if (tx_count <= 4'd7)      ps2_data_oe <= ~hdata[tx_count[2:0]];
      else if (tx_count == 4'd8) ps2_data_oe <= ~odd_parity(hdata);
      else                       ps2_data_oe <= 1'b0;  // stop bit, then ack
      tx_count <= tx_count + 1'b1;
    end
  end

  // ---------------------------------------------------------- assertions
  // A transfer may only be requested while the controller is ready for one.
  a_send_when_ready : assert property (
    @(posedge clk) disable iff (!resetn) send_start |-> send_rdy)
    else $error("ps2_iobase: idata_rdy raised while send_rdy is low");

  // The lines are only pulled low by the host during a transfer.
  a_drive_only_when_sending : assert property (
    @(posedge clk) disable iff (!resetn) (ps2_clk_oe | ps2_data_oe) |-> sending)
    else $error("ps2_iobase: line driven outside a transfer");

endmodule
