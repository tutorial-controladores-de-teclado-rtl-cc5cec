// tb_kbdex_ctrl: self-checking test of the keyboard controller at the
// default CLKFREQ = 24000 against a behavioural keyboard.
//   * after reset the controller sends ED and the light bits; an FE reply
//     makes it send ED again; a lights change sends a new ED exchange
//   * key slots: press, typematic repeat, extended keys, a fourth key,
//     release, slot reuse, fake-shift release, Pause (E1) prefix
//   * the codes of c-cedilla, down arrow and shift + A
//   * key_on follows the slots a fixed number of clocks after a byte
module tb_kbdex_ctrl;
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

  logic        clk_oe, data_oe, line_clk, line_data, push = 1'b0, nack = 1'b0;
  logic [8:0]  push_byte = '0;
  logic [7:0]  last_cmd;
  int          cmd_count, rx_errors, aborts;
  logic [2:0]  lights = 3'b101, key_on;
  logic [47:0] key_code;

  kbdex_ctrl dut (
    .clk(clk), .en(en), .resetn(resetn),
    .ps2_clk_i(line_clk), .ps2_data_i(line_data),
    .ps2_clk_oe(clk_oe), .ps2_data_oe(data_oe),
    .lights(lights), .key_on(key_on), .key_code(key_code)
  );

  ps2_device_model #(.IS_MOUSE(1'b0)) dev (
    .host_clk_oe(clk_oe), .host_data_oe(data_oe),
    .line_clk(line_clk), .line_data(line_data),
    .push(push), .push_byte(push_byte), .nack_req(nack),
    .last_cmd(last_cmd), .cmd_count(cmd_count), .rx_errors(rx_errors), .aborts(aborts)
  );

  logic [7:0] cmds[$];
  always @(cmd_count) if (cmd_count > 0) cmds.push_back(last_cmd);

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

  function automatic logic [15:0] slot(input int i);
    return key_code[16*i +: 16];
  endfunction

  // latency from a received byte to the key_on update
  int lat = -1, since = -1;
  always @(posedge clk) begin
    if (dut.u_io.odata_rdy && !dut.datardy_q) since <= 0;
    else if (since >= 0) since <= since + 1;
    if (dut.state == dut.CLRDP) lat <= since + 1;
  end

  initial begin
    #500 resetn = 1'b1;
    // ED with FE once: ED, ED, 05
    nack = 1'b1;
    #1000 nack = 1'b0;
    wait (cmd_count == 3);
    #(30_000_000);
    check(cmds.size() == 3 && cmds[0] == 8'hED && cmds[1] == 8'hED && cmds[2] == 8'h05,
          $sformatf("reset lights exchange %p", cmds));
    check(rx_errors == 0, "host frames well formed");

    // lights change: ED 02
    lights = 3'b010;
    wait (cmd_count == 5);
    #(30_000_000);
    check(cmds.size() == 5 && cmds[3] == 8'hED && cmds[4] == 8'h02,
          $sformatf("lights change exchange %p", cmds));
    check(dut.sigsending == 1'b0, "command sequencer idle");

    key_bytes('{8'h1C});
    check(key_on == 3'b001 && slot(0) == 16'h001C, "press A");
    check(lat == 5, $sformatf("key slot update %0d clocks after byte", lat));
    key_bytes('{8'hE0, 8'h75});
    check(key_on == 3'b011 && slot(1) == 16'hE075, "press up arrow (E0 75)");
    key_bytes('{8'h1C});
    check(key_on == 3'b011 && slot(2) == 16'h0000, "typematic repeat ignored");
    key_bytes('{8'h23, 8'h2B});
    check(key_on == 3'b111 && slot(2) == 16'h0023 && slot(0) == 16'h001C,
          "third key stored, fourth ignored");
    key_bytes('{8'hF0, 8'h1C});
    check(key_on == 3'b110 && slot(0) == 16'h0000, "release A clears slot 0");
    key_bytes('{8'h2B});
    check(key_on == 3'b111 && slot(0) == 16'h002B, "new key takes first empty slot");
    key_bytes('{8'hE0, 8'hF0, 8'h75});
    check(key_on == 3'b101 && slot(1) == 16'h0000, "extended release clears slot 1");
    key_bytes('{8'hE0, 8'h12});
    check(key_on == 3'b111 && slot(1) == 16'hE012, "fake shift press E012");
    key_bytes('{8'hF0, 8'h12});
    check(key_on == 3'b101 && slot(1) == 16'h0000, "shift release clears fake shift");
    key_bytes('{8'hF0, 8'h2B, 8'hF0, 8'h23});
    check(key_on == 3'b000 && key_code == '0, "all released");
    key_bytes('{8'hE1, 8'h14, 8'h77});
    check(key_on == 3'b011 && slot(0) == 16'h0014 && slot(1) == 16'h0077,
          "Pause shows as 0014 and 0077");
    key_bytes('{8'hE1, 8'hF0, 8'h14, 8'hF0, 8'h77});
    check(key_on == 3'b000, "Pause released");

    // The lab's scancode questions: c-cedilla (the key right of L on a
    // Brazilian ABNT2 layout, 4C), down arrow (E0 72) and a capital A
    // typed with left shift (12 then 1C, both held).
    key_bytes('{8'h4C});
    check(key_on == 3'b001 && slot(0) == 16'h004C, "c-cedilla shows as 004C");
    key_bytes('{8'hF0, 8'h4C, 8'hE0, 8'h72});
    check(key_on == 3'b001 && slot(0) == 16'hE072, "down arrow shows as E072");
    key_bytes('{8'hE0, 8'hF0, 8'h72, 8'h12, 8'h1C});
    check(key_on == 3'b011 && slot(0) == 16'h0012 && slot(1) == 16'h001C,
          "capital A shows as 0012 and 001C");
    key_bytes('{8'hF0, 8'h1C, 8'hF0, 8'h12});
    check(key_on == 3'b000 && key_code == '0, "capital A released");

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
