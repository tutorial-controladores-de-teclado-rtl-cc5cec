// tb_ps2_iobase: self-checking test of the PS/2 line controller at the
// default 24 MHz / CLKFREQ = 24000 setting against the behavioural device.
//   1. device-to-host bytes: value, odata_rdy pulse once per byte and about
//      one PS/2 bit long
//   2. a frame with a wrong parity bit is not reported
//   3. host-to-device byte: the device receives it with good parity; the
//      clock is held low CLKFREQ/10+100 clocks, data is pulled low
//      CLKFREQ/10+50 clocks after the clock; send_rdy stays low for 11 ms
//      after the transfer
module tb_ps2_iobase;
  localparam int unsigned CLKFREQ = 24000;

  logic clk = 1'b0, resetn = 1'b0, en = 1'b1;
  logic idata_rdy = 1'b0;
  logic [7:0] idata = '0, odata, last_cmd;
  logic send_rdy, odata_rdy, clk_oe, data_oe, line_clk, line_data;
  logic push = 1'b0, nack_req = 1'b0;
  logic [8:0] push_byte = '0;
  int cmd_count, rx_errors, aborts;
  int checks = 0, failures = 0;

  always #20.833 clk = ~clk;

  ps2_iobase #(.CLKFREQ(CLKFREQ)) dut (
    .clk(clk), .en(en), .resetn(resetn),
    .ps2_clk_i(line_clk), .ps2_data_i(line_data),
    .ps2_clk_oe(clk_oe), .ps2_data_oe(data_oe),
    .idata_rdy(idata_rdy), .idata(idata), .send_rdy(send_rdy),
    .odata_rdy(odata_rdy), .odata(odata)
  );

  ps2_device_model #(.IS_MOUSE(1'b0)) dev (
    .host_clk_oe(clk_oe), .host_data_oe(data_oe),
    .line_clk(line_clk), .line_data(line_data),
    .push(push), .push_byte(push_byte), .nack_req(nack_req),
    .last_cmd(last_cmd), .cmd_count(cmd_count), .rx_errors(rx_errors), .aborts(aborts)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // received bytes and odata_rdy pulse lengths
  logic [7:0] rx_q[$];
  int rdy_len = 0, last_rdy_len = 0;
  always @(posedge clk) begin
    if (odata_rdy) rdy_len <= rdy_len + 1;
    else if (rdy_len != 0) begin
      last_rdy_len <= rdy_len;
      rdy_len <= 0;
    end
  end
  always @(posedge odata_rdy) rx_q.push_back(odata);

  task automatic dev_send(input logic [8:0] b);
    push_byte = b;
    push = 1'b1;
    #1000;
    push = 1'b0;
    #1000;
  endtask

  // clock/data hold measurement
  int clk_hold = 0, data_lead = 0;
  always @(posedge clk) begin
    if (clk_oe) begin
      clk_hold <= clk_hold + 1;
      if (!data_oe) data_lead <= data_lead + 1;
    end
  end

  initial begin
    logic [7:0] vals[4] = '{8'hA5, 8'h00, 8'hFF, 8'h3C};
    longint t0, t1;
    #500 resetn = 1'b1;
    repeat (10) @(posedge clk);
    check(send_rdy == 1'b1, "send_rdy high after reset");

    // 1. device to host
    foreach (vals[i]) dev_send({1'b0, vals[i]});
    #(12 * 80000 * 4 + 200000);
    check(rx_q.size() == 4, $sformatf("4 bytes received, got %0d", rx_q.size()));
    foreach (vals[i])
      if (i < rx_q.size()) check(rx_q[i] == vals[i],
        $sformatf("byte %0d = %02h, expected %02h", i, rx_q[i], vals[i]));
    // one PS/2 bit period is 80 us = 1920 clocks
    check(last_rdy_len > 1800 && last_rdy_len < 2000,
          $sformatf("odata_rdy pulse length %0d clocks", last_rdy_len));

    // 2. parity error
    rx_q.delete();
    dev_send({1'b1, 8'h5A});
    #(12 * 80000 + 200000);
    check(rx_q.size() == 0, "frame with bad parity is dropped");
    dev_send({1'b0, 8'h5A});
    #(12 * 80000 + 200000);
    check(rx_q.size() == 1 && rx_q[0] == 8'h5A, "next good frame is received");

    // 3. host to device
    clk_hold = 0;
    data_lead = 0;
    rx_q.delete();
    @(posedge clk);
    idata <= 8'hC6;
    idata_rdy <= 1'b1;
    @(posedge clk);
    idata_rdy <= 1'b0;
    idata <= 8'h00;
    repeat (3) @(posedge clk);
    check(send_rdy == 1'b0, "send_rdy low during transfer");
    wait (cmd_count == 1);
    t0 = $time;
    check(last_cmd == 8'hC6, $sformatf("device received %02h", last_cmd));
    check(rx_errors == 0, "host frame parity and stop bit");
    check(clk_hold == CLKFREQ / 10 + 100 || clk_hold == CLKFREQ / 10 + 101,
          $sformatf("clock held low %0d clocks", clk_hold));
    check(data_lead == CLKFREQ / 10 + 50 || data_lead == CLKFREQ / 10 + 51,
          $sformatf("data pulled low after %0d clocks", data_lead));
    wait (send_rdy);
    t1 = $time;
    // 11 ms after the end of the transfer; the device's last clock pulse
    // ends about 1.25 bit periods before t0
    check((t1 - t0) > 10_800_000 && (t1 - t0) < 11_100_000,
          $sformatf("send_rdy back after %0d ns", t1 - t0));
    // the FA reply arrives as a normal received byte
    #(12 * 80000 + 200000);
    check(rx_q.size() == 1 && rx_q[0] == 8'hFA, "reply after command received");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
