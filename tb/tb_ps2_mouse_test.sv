// tb_ps2_mouse_test: runs the mouse demonstration design at its defaults
// (24 MHz, SENSIBILITY 16) with a behavioural wheel mouse: initialisation,
// then packets; checks the position read back from the four displays
// against a reference accumulator, the button, overflow and wheel LEDs,
// and the 300 kHz output (80 clocks per period).
module tb_ps2_mouse_test;
  import seg_decode_pkg::*;

  logic [1:0] CLOCK_24 = '0;
  logic [3:0] KEY = 4'b1110;
  logic       CLOCK_300;
  logic [6:0] HEX0, HEX1, HEX2, HEX3;
  logic [7:0] LEDG;
  logic [9:0] LEDR;
  logic       clk_oe, data_oe, line_clk, line_data, push = 1'b0, nack = 1'b0;
  logic [8:0] push_byte = '0;
  logic [7:0] last_cmd;
  int         cmd_count, rx_errors, aborts;
  int checks = 0, failures = 0;

  always #20.833 CLOCK_24[0] = ~CLOCK_24[0];

  ps2_mouse_test dut (
    .CLOCK_24(CLOCK_24), .CLOCK_300(CLOCK_300), .KEY(KEY),
    .HEX0(HEX0), .HEX1(HEX1), .HEX2(HEX2), .HEX3(HEX3), .LEDG(LEDG), .LEDR(LEDR),
    .PS2_CLK_I(line_clk), .PS2_DAT_I(line_data), .PS2_CLK_OE(clk_oe), .PS2_DAT_OE(data_oe)
  );

  ps2_device_model #(.IS_MOUSE(1'b1), .HAS_WHEEL(1'b1)) dev (
    .host_clk_oe(clk_oe), .host_data_oe(data_oe),
    .line_clk(line_clk), .line_data(line_data),
    .push(push), .push_byte(push_byte), .nack_req(nack),
    .last_cmd(last_cmd), .cmd_count(cmd_count), .rx_errors(rx_errors), .aborts(aborts)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int FRAME_NS = 11 * 80000 + 160000;

  task automatic packet(input logic [7:0] b0, b1, b2, b3);
    logic [7:0] b[4] = '{b0, b1, b2, b3};
    foreach (b[i]) begin
      push_byte = {1'b0, b[i]};
      push = 1'b1;
      #1000;
      push = 1'b0;
      #1000;
    end
    #(4 * FRAME_NS + FRAME_NS / 2);
  endtask

  // reference accumulator, quotient and remainder toward zero
  int ax = 0, ay = 0, px = 0, py = 0;
  function automatic void acc(input int d, inout int a, inout int p);
    int s, m;
    s = a + d;
    m = (s < 0) ? -s : s;
    p = (p + ((s < 0) ? -(m / 16) : (m / 16))) & 255;
    a = (s < 0) ? -(m % 16) : (m % 16);
  endfunction

  // 300 kHz output period
  int per = 0, last_per = 0;
  always @(posedge CLOCK_24[0]) begin
    if (CLOCK_300 && !$past(CLOCK_300)) begin
      last_per <= per;
      per <= 1;
    end else per <= per + 1;
  end

  initial begin
    #500 KEY[0] = 1'b1;
    wait (cmd_count == 11);
    #(4 * FRAME_NS);
    check(last_cmd == 8'hF4, "initialisation ends with enable reporting");
    check(seg4_to_hex(HEX3, HEX2, HEX1, HEX0) == 16'h0000, "position 0000 after reset");
    check(last_per == 80, $sformatf("CLOCK_300 period %0d clocks", last_per));

    // left button, dx +40, dy -20, wheel +1
    packet(8'h29, 8'd40, 8'hEC, 8'h01);
    acc(40, ax, px);
    acc(-20, ay, py);
    check(seg4_to_hex(HEX3, HEX2, HEX1, HEX0) == ((px << 8) | py),
          $sformatf("position %h expected %h", seg4_to_hex(HEX3, HEX2, HEX1, HEX0), (px << 8) | py));
    check(LEDG == 8'b001_0_0001 && LEDR == '0, $sformatf("LEDs %b %b", LEDG, LEDR));

    // right+middle, X overflow, dx +40, dy +100, wheel -2
    packet(8'h4E, 8'd40, 8'd100, 8'h0E);
    acc(40, ax, px);
    acc(100, ay, py);
    check(seg4_to_hex(HEX3, HEX2, HEX1, HEX0) == ((px << 8) | py),
          $sformatf("position %h expected %h", seg4_to_hex(HEX3, HEX2, HEX1, HEX0), (px << 8) | py));
    check(LEDG == 8'b110_0_1110 && LEDR == 10'b10_0000_0000, $sformatf("LEDs %b %b", LEDG, LEDR));

    // Y overflow only, small negative X movements accumulate
    for (int i = 0; i < 5; i++) begin
      packet(8'h98, 8'hF9, 8'h00, 8'h00);   // dx -7, dy 0, Y overflow
      acc(-7, ax, px);
      acc(0, ay, py);
    end
    check(seg4_to_hex(HEX3, HEX2, HEX1, HEX0) == ((px << 8) | py),
          $sformatf("position %h expected %h", seg4_to_hex(HEX3, HEX2, HEX1, HEX0), (px << 8) | py));
    check(LEDR == 10'b00_1000_0000 && LEDG == '0, $sformatf("LEDs %b %b", LEDG, LEDR));

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
