// tb_ps2_kbd_test: runs the keyboard demonstration design at its defaults
// (24 MHz, 5 Hz light steps) with a behavioural keyboard for about 0.65 s.
//   * each light step sends ED and the new light byte; with the light
//     rotator at 001 -> 010 -> 100 the bytes are 04 then 02 (bit mapping
//     Scroll = rotator bit 0, Caps = bit 1, Num = bit 2); steps are 200 ms
//     apart
//   * a held key shows its code on the displays and on LEDG[7:5] and stops
//     the lights; after release the code clears and the lights move again
module tb_ps2_kbd_test;
  import seg_decode_pkg::*;

  logic [1:0] CLOCK_24 = '0;
  logic [3:0] KEY = 4'b1110;
  logic [6:0] HEX0, HEX1, HEX2, HEX3;
  logic [7:0] LEDG;
  logic [9:0] LEDR;
  logic       clk_oe, data_oe, line_clk, line_data, push = 1'b0, nack = 1'b0;
  logic [8:0] push_byte = '0;
  logic [7:0] last_cmd;
  int         cmd_count, rx_errors, aborts;
  int checks = 0, failures = 0;

  always #20.833 CLOCK_24[0] = ~CLOCK_24[0];

  ps2_kbd_test dut (
    .CLOCK_24(CLOCK_24), .KEY(KEY), .SW(10'd0),
    .HEX0(HEX0), .HEX1(HEX1), .HEX2(HEX2), .HEX3(HEX3), .LEDG(LEDG), .LEDR(LEDR),
    .PS2_CLK_I(line_clk), .PS2_DAT_I(line_data), .PS2_CLK_OE(clk_oe), .PS2_DAT_OE(data_oe)
  );

  ps2_device_model #(.IS_MOUSE(1'b0)) dev (
    .host_clk_oe(clk_oe), .host_data_oe(data_oe),
    .line_clk(line_clk), .line_data(line_data),
    .push(push), .push_byte(push_byte), .nack_req(nack),
    .last_cmd(last_cmd), .cmd_count(cmd_count), .rx_errors(rx_errors), .aborts(aborts)
  );

  // second instance: slot selection by switches
  logic [9:0] SW2 = '0;
  logic [6:0] S_HEX0, S_HEX1, S_HEX2, S_HEX3;
  logic [7:0] S_LEDG;
  logic [9:0] S_LEDR;
  logic       s_clk_oe, s_data_oe, s_line_clk, s_line_data, s_push = 1'b0;
  logic [8:0] s_byte = '0;
  logic [7:0] s_last;
  int         s_cmds, s_rxerr, s_aborts;

  ps2_kbd_test #(.SLOT_SELECT(1'b1)) dut_sel (
    .CLOCK_24(CLOCK_24), .KEY(KEY), .SW(SW2),
    .HEX0(S_HEX0), .HEX1(S_HEX1), .HEX2(S_HEX2), .HEX3(S_HEX3), .LEDG(S_LEDG), .LEDR(S_LEDR),
    .PS2_CLK_I(s_line_clk), .PS2_DAT_I(s_line_data), .PS2_CLK_OE(s_clk_oe), .PS2_DAT_OE(s_data_oe)
  );

  ps2_device_model #(.IS_MOUSE(1'b0)) dev_sel (
    .host_clk_oe(s_clk_oe), .host_data_oe(s_data_oe),
    .line_clk(s_line_clk), .line_data(s_line_data),
    .push(s_push), .push_byte(s_byte), .nack_req(1'b0),
    .last_cmd(s_last), .cmd_count(s_cmds), .rx_errors(s_rxerr), .aborts(s_aborts)
  );

  task automatic sel_bytes(input logic [7:0] b[$]);
    foreach (b[i]) begin
      s_byte = {1'b0, b[i]};
      s_push = 1'b1;
      #1000;
      s_push = 1'b0;
      #1000;
    end
    #(b.size() * FRAME_NS + FRAME_NS / 2);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int FRAME_NS = 11 * 80000 + 160000;

  task automatic key_bytes(input logic [7:0] b[$]);
    foreach (b[i]) begin
      push_byte = {1'b0, b[i]};
      push = 1'b1;
      #1000;
      push = 1'b0;
      #1000;
    end
    #(b.size() * FRAME_NS + FRAME_NS / 2);
  endtask

  logic [7:0] cmds[$];
  longint     cmd_t[$];
  always @(cmd_count) if (cmd_count > 0) begin
    cmds.push_back(last_cmd);
    cmd_t.push_back($time);
  end

  initial begin
    #500 KEY[1:0] = 2'b11;
    wait (cmd_count == 2);
    #1000;
    check(cmds[0] == 8'hED && cmds[1] == 8'h04, $sformatf("first exchange %p", cmds));
    #(30_000_000);                                   // t ~ 45 ms
    key_bytes('{8'h1C});                             // press A
    check(seg4_to_hex(HEX3, HEX2, HEX1, HEX0) == 16'h001C, "display shows 001C");
    check(LEDG == 8'b001_00000, $sformatf("LEDG %b", LEDG));
    // slot selection on the second instance
    sel_bytes('{8'h1C, 8'hE0, 8'h75, 8'h23});
    for (int k = 0; k < 4; k++) begin
      logic [15:0] exp_code[4] = '{16'h001C, 16'hE075, 16'h0023, 16'h0000};
      SW2 = 10'(k);
      #1000;
      check(seg4_to_hex(S_HEX3, S_HEX2, S_HEX1, S_HEX0) == exp_code[k],
            $sformatf("SW=%0d shows %h", k, seg4_to_hex(S_HEX3, S_HEX2, S_HEX1, S_HEX0)));
    end
    check(S_LEDG[7:5] == 3'b111, "three keys held on the second instance");
    sel_bytes('{8'hF0, 8'h1C, 8'hE0, 8'hF0, 8'h75, 8'hF0, 8'h23});
    check(S_LEDG[7:5] == 3'b000, "second instance keys released");
    #(250_000_000 - $time);                          // past the 200 ms step
    check(cmd_count == 2, "lights hold while a key is pressed");
    key_bytes('{8'hF0, 8'h1C});                      // release A
    check(seg4_to_hex(HEX3, HEX2, HEX1, HEX0) == 16'h0000 && LEDG == '0, "key released");
    wait (cmd_count == 4);
    #1000;
    check(cmds[2] == 8'hED && cmds[3] == 8'h02, $sformatf("second exchange %p", cmds));
    check(cmd_t[2] > 399_000_000 && cmd_t[2] < 402_000_000,
          $sformatf("second step at %0d ns, expected 400 ms plus one command frame", cmd_t[2]));
    wait (cmd_count == 6);
    #1000;
    check(cmds[4] == 8'hED && cmds[5] == 8'h04, $sformatf("third exchange %p", cmds));
    check(cmd_t[4] - cmd_t[2] > 199_000_000 && cmd_t[4] - cmd_t[2] < 201_000_000,
          $sformatf("step spacing %0d ns, expected 200 ms", cmd_t[4] - cmd_t[2]));
    check(rx_errors == 0 && LEDR == '0, "frames well formed, LEDR off");
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
