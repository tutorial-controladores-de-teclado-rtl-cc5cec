// tb_ps2_tutorial_top: end-to-end test of both demonstration designs at
// their default parameters (24 MHz clock, 5 Hz light steps), each with its
// own behavioural PS/2 device, running at the same time.
//
// Mouse design: initialisation with wheel detection, 4-byte packets,
// position with remainder carry, overflow and wheel LEDs, 300 kHz output.
// Keyboard design: ED exchange with one FE resend, light steps every
// 200 ms, lights held while a key is down, press/release, extended key,
// typematic repeat and fourth key ignored, fake-shift release, and a key
// frame abandoned by the keyboard when the controller starts a command.
// Every mechanism is counted; one that never happened is a failure.
module tb_ps2_tutorial_top;
  import seg_decode_pkg::*;

  logic [1:0] M_CLOCK_24 = '0, K_CLOCK_24 = '0;
  logic [3:0] M_KEY = 4'b1110, K_KEY = 4'b1110;
  logic       M_CLOCK_300;
  logic [6:0] M_HEX0, M_HEX1, M_HEX2, M_HEX3, K_HEX0, K_HEX1, K_HEX2, K_HEX3;
  logic [7:0] M_LEDG, K_LEDG;
  logic [9:0] M_LEDR, K_LEDR;
  logic       m_clk_oe, m_data_oe, m_line_clk, m_line_data;
  logic       k_clk_oe, k_data_oe, k_line_clk, k_line_data;
  logic       m_push = 1'b0, k_push = 1'b0, m_nack = 1'b0, k_nack = 1'b0;
  logic [8:0] m_byte = '0, k_byte = '0;
  logic [7:0] m_last, k_last;
  int         m_cmds, m_rxerr, m_aborts, k_cmds, k_rxerr, k_aborts;

  always #20.833 M_CLOCK_24[0] = ~M_CLOCK_24[0];
  always #20.833 K_CLOCK_24[0] = ~K_CLOCK_24[0];

  ps2_tutorial_top dut (
    .M_CLOCK_24(M_CLOCK_24), .M_CLOCK_300(M_CLOCK_300), .M_KEY(M_KEY),
    .M_HEX0(M_HEX0), .M_HEX1(M_HEX1), .M_HEX2(M_HEX2), .M_HEX3(M_HEX3),
    .M_LEDG(M_LEDG), .M_LEDR(M_LEDR),
    .M_PS2_CLK_I(m_line_clk), .M_PS2_DAT_I(m_line_data),
    .M_PS2_CLK_OE(m_clk_oe), .M_PS2_DAT_OE(m_data_oe),
    .K_CLOCK_24(K_CLOCK_24), .K_KEY(K_KEY), .K_SW(10'd0),
    .K_HEX0(K_HEX0), .K_HEX1(K_HEX1), .K_HEX2(K_HEX2), .K_HEX3(K_HEX3),
    .K_LEDG(K_LEDG), .K_LEDR(K_LEDR),
    .K_PS2_CLK_I(k_line_clk), .K_PS2_DAT_I(k_line_data),
    .K_PS2_CLK_OE(k_clk_oe), .K_PS2_DAT_OE(k_data_oe)
  );

  ps2_device_model #(.IS_MOUSE(1'b1), .HAS_WHEEL(1'b1)) mouse (
    .host_clk_oe(m_clk_oe), .host_data_oe(m_data_oe),
    .line_clk(m_line_clk), .line_data(m_line_data),
    .push(m_push), .push_byte(m_byte), .nack_req(m_nack),
    .last_cmd(m_last), .cmd_count(m_cmds), .rx_errors(m_rxerr), .aborts(m_aborts)
  );

  ps2_device_model #(.IS_MOUSE(1'b0)) kbd (
    .host_clk_oe(k_clk_oe), .host_data_oe(k_data_oe),
    .line_clk(k_line_clk), .line_data(k_line_data),
    .push(k_push), .push_byte(k_byte), .nack_req(k_nack),
    .last_cmd(k_last), .cmd_count(k_cmds), .rx_errors(k_rxerr), .aborts(k_aborts)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_init = 0, n_wheel = 0, n_packet = 0, n_carry = 0, n_overflow = 0, n_clk300 = 0;
  int n_resend = 0, n_step = 0, n_hold = 0, n_press = 0, n_release = 0, n_ext = 0;
  int n_repeat = 0, n_fourth = 0, n_fake = 0, n_abort = 0;

  localparam int FRAME_NS = 11 * 80000 + 160000;

  task automatic m_send(input logic [7:0] b[$]);
    foreach (b[i]) begin
      m_byte = {1'b0, b[i]};
      m_push = 1'b1;
      #1000;
      m_push = 1'b0;
      #1000;
    end
    #(b.size() * FRAME_NS + FRAME_NS / 2);
  endtask

  task automatic k_send(input logic [7:0] b[$]);
    foreach (b[i]) begin
      k_byte = {1'b0, b[i]};
      k_push = 1'b1;
      #1000;
      k_push = 1'b0;
      #1000;
    end
    #(b.size() * FRAME_NS + FRAME_NS / 2);
  endtask

  function automatic int m_pos();
    return seg4_to_hex(M_HEX3, M_HEX2, M_HEX1, M_HEX0);
  endfunction
  function automatic int k_code();
    return seg4_to_hex(K_HEX3, K_HEX2, K_HEX1, K_HEX0);
  endfunction

  // 300 kHz output
  int per = 0;
  always @(posedge M_CLOCK_24[0]) begin
    if (M_CLOCK_300 && !$past(M_CLOCK_300)) begin
      if (per == 80) n_clk300++;
      else if (n_clk300 > 0) check(1'b0, $sformatf("CLOCK_300 period %0d", per));
      per <= 1;
    end else per <= per + 1;
  end

  // keyboard command log
  logic [7:0] k_log[$];
  always @(k_cmds) if (k_cmds > 0) k_log.push_back(k_last);

  // reference accumulator for the mouse position
  int ax = 0, ay = 0, px = 0, py = 0;
  function automatic void acc(input int d, inout int a, inout int p);
    int s, m;
    s = a + d;
    m = (s < 0) ? -s : s;
    p = (p + ((s < 0) ? -(m / 16) : (m / 16))) & 255;
    a = (s < 0) ? -(m % 16) : (m % 16);
  endfunction

  task automatic mouse_run();
    int dxs[6] = '{40, 40, -7, -7, 100, 3};
    int dys[6] = '{-20, 100, 0, 5, -3, -60};
    M_KEY[0] = 1'b1;
    wait (m_cmds == 11);
    #(4 * FRAME_NS);
    check(m_last == 8'hF4 && m_rxerr == 0, "mouse initialised");
    n_init++;
    check(dut.u_mouse_test.u_mouse.wheel_present, "wheel detected");
    if (dut.u_mouse_test.u_mouse.wheel_present) n_wheel++;
    foreach (dxs[i]) begin
      logic [7:0] b0;
      logic       ovf;
      ovf = (i == 2);
      b0 = {1'b0, ovf, dys[i] < 0, dxs[i] < 0, 1'b1, 3'(i)};
      m_send('{b0, 8'(dxs[i]), 8'(dys[i]), 8'(i - 3)});
      acc(dxs[i], ax, px);
      acc(dys[i], ay, py);
      check(m_pos() == ((px << 8) | py),
            $sformatf("mouse packet %0d position %h expected %h", i, m_pos(), (px << 8) | py));
      check(M_LEDG == {3'(i), 1'b0, 4'(i - 3)} && M_LEDR[9] == ovf,
            $sformatf("mouse packet %0d LEDs %b %b", i, M_LEDG, M_LEDR));
      n_packet++;
      if (ax != 0 || ay != 0) n_carry++;
      if (M_LEDR[9]) n_overflow++;
    end
  endtask

  task automatic kbd_run();
    k_nack = 1'b1;
    #1000 k_nack = 1'b0;
    K_KEY[1:0] = 2'b11;
    wait (k_cmds == 3);
    #1000;
    check(k_log[0] == 8'hED && k_log[1] == 8'hED && k_log[2] == 8'h04,
          $sformatf("first lights exchange with resend %p", k_log));
    if (k_log[1] == 8'hED) n_resend++;
    n_step++;
    #(40_000_000 - $time);
    k_send('{8'h1C});
    check(k_code() == 16'h001C && K_LEDG[7:5] == 3'b001, "key A pressed");
    n_press++;
    #(210_000_000 - $time);
    check(k_cmds == 3, "lights held at the 200 ms step while a key is down");
    if (k_cmds == 3) n_hold++;
    k_send('{8'hE0, 8'h75});
    check(K_LEDG[7:5] == 3'b011 && dut.u_kbd_test.u_kbd.key_code[31:16] == 16'hE075,
          "extended key in slot 1");
    n_ext++;
    k_send('{8'h1C});
    check(K_LEDG[7:5] == 3'b011 && dut.u_kbd_test.u_kbd.key_code[47:32] == '0,
          "typematic repeat ignored");
    n_repeat++;
    k_send('{8'h23, 8'h2B});
    check(K_LEDG[7:5] == 3'b111 && dut.u_kbd_test.u_kbd.key_code[47:32] == 16'h0023,
          "fourth key ignored");
    n_fourth++;
    k_send('{8'hF0, 8'h1C, 8'hE0, 8'hF0, 8'h75, 8'hF0, 8'h23});
    check(K_LEDG[7:5] == 3'b000 && k_code() == 16'h0000, "all keys released");
    n_release++;
    k_send('{8'hE0, 8'h12});
    check(k_code() == 16'hE012, "fake shift pressed");
    k_send('{8'hF0, 8'h12});
    check(k_code() == 16'h0000 && K_LEDG[7:5] == 3'b000, "fake shift cleared by shift release");
    n_fake++;
    wait (k_cmds == 5);
    #1000;
    check(k_log[3] == 8'hED && k_log[4] == 8'h02, $sformatf("400 ms lights exchange %p", k_log));
    n_step++;
    // a key frame that collides with the 600 ms light step
    #(599_500_000 - $time);
    k_byte = {1'b0, 8'h1C};
    k_push = 1'b1;
    #1000 k_push = 1'b0;
    wait (k_cmds == 7);
    #(3 * FRAME_NS);
    check(k_aborts > 0, "keyboard abandoned its frame when the host took the bus");
    if (k_aborts > 0) n_abort++;
    check(k_log[5] == 8'hED && k_log[6] == 8'h04, $sformatf("600 ms lights exchange %p", k_log));
    n_step++;
    check(k_rxerr == 0 && K_LEDR == '0, "keyboard frames well formed");
  endtask

  initial begin
    #500;
    fork
      mouse_run();
      kbd_run();
    join
    check(n_init > 0, "mouse initialisation happened");
    check(n_wheel > 0, "wheel detection happened");
    check(n_packet > 0, "mouse packets decoded");
    check(n_carry > 0, "position remainder carried");
    check(n_overflow > 0, "overflow flag shown");
    check(n_clk300 > 0, "300 kHz clock ran");
    check(n_resend > 0, "FE resend happened");
    check(n_step >= 3, "light steps happened");
    check(n_hold > 0, "lights held by a key");
    check(n_press > 0 && n_release > 0, "key press and release");
    check(n_ext > 0, "extended key");
    check(n_repeat > 0, "typematic repeat");
    check(n_fourth > 0, "fourth key");
    check(n_fake > 0, "fake shift release");
    check(n_abort > 0, "frame abandoned and controller recovered");
    $display("mechanisms: init=%0d wheel=%0d packets=%0d carry=%0d overflow=%0d clk300=%0d",
             n_init, n_wheel, n_packet, n_carry, n_overflow, n_clk300);
    $display("mechanisms: resend=%0d steps=%0d hold=%0d press=%0d release=%0d ext=%0d repeat=%0d fourth=%0d fake=%0d abort=%0d",
             n_resend, n_step, n_hold, n_press, n_release, n_ext, n_repeat, n_fourth, n_fake, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #900_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
