// kbd_lights_rotator: back-and-forth light pattern for the keyboard LEDs.
//
// A single lit bit moves across lights[2:0] one position per step:
// 001, 010, 100, 010, 001, 010, ... The direction turns at each end: when
// bit 2 is lit it moves down, when bit 0 is lit it moves up. The pattern
// only moves while no key is held (key_on == 0); otherwise it stays put.
//
// Interface: step is a one-clock pulse (5 per second in the keyboard
// example); lights is registered and changes on the clock after step.
// resetn (asynchronous, active low) sets lights to 001 and the direction
// to "up".
//
// The pattern, its reset value and the hold while keys are pressed follow
// the keyboard example; a step enable in place of a slow clock is this
// design's choice.
module kbd_lights_rotator (
  input  logic       clk,
  input  logic       resetn,
  input  logic       step,
  input  logic [2:0] key_on,
  output logic [2:0] lights
);

  logic dir, dir_next;  // 0: moving toward bit 2, 1: moving toward bit 0

  always_comb begin
    dir_next = dir;
    if (lights[2])      dir_next = 1'b1;
    else if (lights[0]) dir_next = 1'b0;
  end

  always_ff @(posedge clk or negedge resetn) begin
    if (!resetn) begin
      dir    <= 1'b0;
      lights <= 3'b001;
    end else if (step) begin
      dir <= dir_next;
      if (key_on == 3'b000)
        lights <= dir_next ? {lights[0], lights[2:1]} : {lights[1:0], lights[2]};
    end
  end

endmodule
