// ps2_device_model: behavioural PS/2 device (mouse or keyboard) for the
// testbenches. Not synthesizable.
//
// The bus is modelled as two open-drain lines with pull-ups: a line is low
// when the host or the device pulls it low. The device:
//   * sends queued bytes as 11-bit frames (start, 8 data LSB first, odd
//     parity, stop) with a clock half period of HALF_NS; a byte is pushed by
//     a rising edge on push, with push_byte[8] set to corrupt its parity.
//     If the host holds the clock low before the last bit, the frame is
//     abandoned and sent again later, as a real device does.
//   * answers a host request-to-send (clock released with data low): it
//     clocks in 8 data bits, parity and stop bit, pulls data low for the
//     acknowledge bit, and then queues its reply:
//       mouse:    FF -> FA AA 00; F2 -> FA, ID (03 with a wheel, else 00);
//                 anything else -> FA
//       keyboard: FF -> FA AA; anything else -> FA
//     A rising edge on nack_req makes the next reply FE (resend) instead.
// Outputs: the last received command, how many were received, how many
// had a parity or stop-bit error, and how many frames were abandoned.
module ps2_device_model #(
  parameter int HALF_NS   = 40000,  // PS/2 clock half period (12.5 kHz)
  parameter bit IS_MOUSE  = 1'b1,
  parameter bit HAS_WHEEL = 1'b1
) (
  input  logic       host_clk_oe,
  input  logic       host_data_oe,
  output logic       line_clk,
  output logic       line_data,
  input  logic       push,
  input  logic [8:0] push_byte,
  input  logic       nack_req,
  output logic [7:0] last_cmd,
  output int         cmd_count,
  output int         rx_errors,
  output int         aborts
);

  logic dev_clk_low = 1'b0;
  logic dev_data_low = 1'b0;
  logic nack_pending = 1'b0;
  logic [8:0] q[$];

  assign line_clk  = ~(host_clk_oe | dev_clk_low);
  assign line_data = ~(host_data_oe | dev_data_low);

  initial begin
    last_cmd  = 8'h00;
    cmd_count = 0;
    rx_errors = 0;
    aborts    = 0;
  end

  always @(posedge push) q.push_back(push_byte);
  always @(posedge nack_req) nack_pending = 1'b1;

  task automatic send_frame(input logic [8:0] b, output bit ok);
    logic [10:0] frame;
    frame = {1'b1, ~(^b[7:0]) ^ b[8], b[7:0], 1'b0};
    ok = 1'b1;
    for (int i = 0; i < 11; i++) begin
      if (!line_clk) begin           // host inhibit
        dev_data_low = 1'b0;
        ok = 1'b0;
        return;
      end
      dev_data_low = ~frame[i];
      #(HALF_NS / 2);
      dev_clk_low = 1'b1;
      #(HALF_NS);
      dev_clk_low = 1'b0;
      #(HALF_NS / 2);
    end
    dev_data_low = 1'b0;
    #(HALF_NS * 2);
  endtask

  task automatic receive_cmd();
    logic [7:0] d;
    logic       par, stop;
    #(HALF_NS);
    for (int k = 1; k <= 11; k++) begin
      dev_clk_low = 1'b1;
      #(HALF_NS);
      dev_clk_low = 1'b0;
      #(HALF_NS / 4);
      if (k <= 8)       d[k-1] = line_data;
      else if (k == 9)  par    = line_data;
      else if (k == 10) begin
        stop = line_data;
        dev_data_low = 1'b1;         // acknowledge bit
      end
      #(HALF_NS - HALF_NS / 4);
    end
    dev_data_low = 1'b0;
    if (par != ~(^d) || !stop) rx_errors++;
    last_cmd = d;
    cmd_count++;
    #(HALF_NS * 4);
    if (nack_pending) begin
      nack_pending = 1'b0;
      q.push_back(9'h0FE);
    end else begin
      q.push_back(9'h0FA);
      if (d == 8'hFF) begin
        q.push_back(9'h0AA);
        if (IS_MOUSE) q.push_back(9'h000);
      end else if (d == 8'hF2 && IS_MOUSE) begin
        q.push_back(HAS_WHEEL ? 9'h003 : 9'h000);
      end
    end
  endtask

  initial begin
    bit ok;
    forever begin
      #1000;
      if (!line_clk && !dev_clk_low) begin
        wait (line_clk);
        #1000;
        if (!line_data) receive_cmd();
      end else if (q.size() > 0 && line_clk && line_data) begin
        send_frame(q[0], ok);
        if (ok) void'(q.pop_front());
        else aborts++;
      end
    end
  end

endmodule
