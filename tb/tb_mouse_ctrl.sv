// tb_mouse_ctrl: self-checking test of the mouse controller at the default
// CLKFREQ = 24000 with two behavioural mice, one with a wheel and one
// without, each on its own controller.
//   * the eleven initialisation commands arrive in order, at least 11 ms
//     apart, and the wheel is detected only on the wheel mouse
//   * 4-byte packets (wheel) and 3-byte packets (no wheel) are decoded:
//     buttons, sign-extended dx/dy, overflow flags, wheel; newdata is low
//     while a packet is arriving and high after its last byte
module tb_mouse_ctrl;
  logic clk = 1'b0, resetn = 1'b0, en = 1'b1;
  always #20.833 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // instance 0: wheel mouse, instance 1: plain mouse
  logic       clk_oe[2], data_oe[2], line_clk[2], line_data[2];
  logic       push[2], nack[2];
  logic [8:0] push_byte[2];
  logic [7:0] last_cmd[2];
  int         cmd_count[2], rx_errors[2], aborts[2];
  logic       newdata[2], ox[2], oy[2], wheel_present[2];
  logic [2:0] bt_on[2];
  logic [8:0] dx[2], dy[2];
  logic [3:0] wheel[2];

  for (genvar g = 0; g < 2; g++) begin : g_m
    mouse_ctrl dut (
      .clk(clk), .en(en), .resetn(resetn),
      .ps2_clk_i(line_clk[g]), .ps2_data_i(line_data[g]),
      .ps2_clk_oe(clk_oe[g]), .ps2_data_oe(data_oe[g]),
      .newdata(newdata[g]), .bt_on(bt_on[g]), .ox(ox[g]), .oy(oy[g]),
      .dx(dx[g]), .dy(dy[g]), .wheel(wheel[g]), .wheel_present(wheel_present[g])
    );
    ps2_device_model #(.IS_MOUSE(1'b1), .HAS_WHEEL(g == 0)) dev (
      .host_clk_oe(clk_oe[g]), .host_data_oe(data_oe[g]),
      .line_clk(line_clk[g]), .line_data(line_data[g]),
      .push(push[g]), .push_byte(push_byte[g]), .nack_req(nack[g]),
      .last_cmd(last_cmd[g]), .cmd_count(cmd_count[g]),
      .rx_errors(rx_errors[g]), .aborts(aborts[g])
    );
    initial begin
      push[g] = 1'b0;
      nack[g] = 1'b0;
      push_byte[g] = '0;
    end
  end

  // command log of instance 0 with reception times
  logic [7:0] cmds[$];
  longint     cmd_t[$];
  always @(cmd_count[0]) if (cmd_count[0] > 0) begin
    cmds.push_back(last_cmd[0]);
    cmd_t.push_back($time);
  end

  task automatic dev_send(input int g, input logic [7:0] b);
    push_byte[g] = {1'b0, b};
    push[g] = 1'b1;
    #1000;
    push[g] = 1'b0;
    #1000;
  endtask

  // newdata must not be high while a packet is partly received
  int nd_rises[2] = '{0, 0};
  always @(posedge newdata[0]) nd_rises[0]++;
  always @(posedge newdata[1]) nd_rises[1]++;

  localparam int FRAME_NS = 11 * 80000 + 160000;

  initial begin
    logic [7:0] exp_cmds[11] = '{8'hFF, 8'hF5, 8'hF3, 8'd200, 8'hF3, 8'd100,
                                 8'hF3, 8'd80, 8'hF2, 8'hF6, 8'hF4};
    #500 resetn = 1'b1;
    wait (cmd_count[0] == 11 && cmd_count[1] == 11);
    #(3 * FRAME_NS);
    check(cmds.size() == 11, $sformatf("11 commands, got %0d", cmds.size()));
    foreach (exp_cmds[i])
      if (i < cmds.size()) check(cmds[i] == exp_cmds[i],
        $sformatf("command %0d = %02h, expected %02h", i, cmds[i], exp_cmds[i]));
    for (int i = 1; i < cmds.size(); i++)
      check(cmd_t[i] - cmd_t[i-1] > 11_000_000,
            $sformatf("command %0d spacing %0d ns", i, cmd_t[i] - cmd_t[i-1]));
    check(rx_errors[0] == 0 && rx_errors[1] == 0, "command frames well formed");
    check(wheel_present[0] == 1'b1, "wheel detected on wheel mouse");
    check(wheel_present[1] == 1'b0, "no wheel on plain mouse");
    check(newdata[0] == 1'b0 && newdata[1] == 1'b0, "no packet before movement");

    // packet 1: left button, dx = -16, dy = +5, wheel -1
    dev_send(0, 8'b0001_1001);
    dev_send(0, 8'hF0);
    dev_send(0, 8'h05);
    // same packet without wheel byte on the plain mouse
    dev_send(1, 8'b0001_1001);
    dev_send(1, 8'hF0);
    dev_send(1, 8'h05);
    #(3 * FRAME_NS + FRAME_NS / 2);
    check(newdata[0] == 1'b0, "4-byte packet not complete after 3 bytes");
    check(newdata[1] == 1'b1, "3-byte packet complete");
    check(bt_on[1] == 3'b001 && dx[1] == 9'h1F0 && dy[1] == 9'd5 && !ox[1] && !oy[1],
          $sformatf("plain packet bt=%b dx=%h dy=%h", bt_on[1], dx[1], dy[1]));
    dev_send(0, 8'h0F);
    #(FRAME_NS + FRAME_NS / 2);
    check(newdata[0] == 1'b1, "4-byte packet complete");
    check(bt_on[0] == 3'b001 && dx[0] == 9'h1F0 && dy[0] == 9'd5 && wheel[0] == 4'hF,
          $sformatf("wheel packet bt=%b dx=%h dy=%h w=%h", bt_on[0], dx[0], dy[0], wheel[0]));

    // packet 2: right+middle buttons, Y negative, both overflow, wheel +2
    dev_send(0, 8'b1110_1110);
    check(newdata[0] == 1'b1, "newdata still high before next frame ends");
    #(FRAME_NS);
    check(newdata[0] == 1'b0, "newdata falls with first byte of next packet");
    dev_send(0, 8'h7F);
    dev_send(0, 8'h80);
    dev_send(0, 8'h02);
    #(4 * FRAME_NS);
    check(newdata[0] == 1'b1 && bt_on[0] == 3'b110 && ox[0] && oy[0] &&
          dx[0] == 9'h07F && dy[0] == 9'h180 && wheel[0] == 4'h2,
          $sformatf("packet 2 bt=%b ox=%b oy=%b dx=%h dy=%h w=%h",
                    bt_on[0], ox[0], oy[0], dx[0], dy[0], wheel[0]));
    check(nd_rises[0] == 2 && nd_rises[1] == 1,
          $sformatf("newdata rises %0d/%0d", nd_rises[0], nd_rises[1]));

    // disable clears the outputs
    en = 1'b0;
    #1000;
    check(dx[0] == '0 && bt_on[0] == '0 && !newdata[0], "en low clears outputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
