// tb_kbd_lights_rotator: checks the back-and-forth light pattern over
// twenty steps, that it holds while a key is held, that it only moves on
// a step pulse, and that it moves one clock after the pulse.
module tb_kbd_lights_rotator;
  logic clk = 1'b0, resetn = 1'b0, step = 1'b0;
  logic [2:0] key_on = '0, lights;
  int checks = 0, failures = 0;
  always #20.833 clk = ~clk;

  kbd_lights_rotator dut (.clk(clk), .resetn(resetn), .step(step),
                          .key_on(key_on), .lights(lights));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse();
    @(posedge clk);
    step <= 1'b1;
    @(posedge clk);
    step <= 1'b0;
    #1;
  endtask

  initial begin
    logic [2:0] seq[4] = '{3'b010, 3'b100, 3'b010, 3'b001};
    #200 resetn = 1'b1;
    @(posedge clk);
    check(lights == 3'b001, "reset pattern 001");
    repeat (10) @(posedge clk);
    check(lights == 3'b001, "no movement without step");
    for (int i = 0; i < 20; i++) begin
      pulse();
      check(lights == seq[i % 4], $sformatf("step %0d: %b expected %b", i, lights, seq[i % 4]));
    end
    // now at 001; hold while a key is pressed
    key_on <= 3'b100;
    repeat (3) pulse();
    check(lights == 3'b001, "held while a key is pressed");
    key_on <= 3'b000;
    pulse();
    check(lights == 3'b010, "moves again after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
