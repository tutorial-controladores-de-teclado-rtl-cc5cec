// tb_mouse_pos_acc: drives 400 random movement packets (with bursts of
// small movements, large ones and both signs) into the position
// accumulator at the default SENSIBILITY of 16 and at 5, and compares x, y
// with a reference that works on the sign and magnitude of each sum.
module tb_mouse_pos_acc;
  logic clk = 1'b0, resetn = 1'b0, newdata = 1'b0;
  logic [8:0] dx = '0, dy = '0;
  logic [7:0] x16, y16, x5, y5;
  int checks = 0, failures = 0;
  always #20.833 clk = ~clk;

  mouse_pos_acc dut16 (.clk(clk), .resetn(resetn), .newdata(newdata),
                       .dx(dx), .dy(dy), .x(x16), .y(y16));
  mouse_pos_acc #(.SENSIBILITY(5)) dut5 (.clk(clk), .resetn(resetn), .newdata(newdata),
                       .dx(dx), .dy(dy), .x(x5), .y(y5));

  // reference: quotient and remainder from the magnitude, sign restored
  function automatic void ref_step(input int d, input int sens, inout int acc, inout int pos);
    int s, mag, q, r;
    s   = acc + d;
    mag = (s < 0) ? -s : s;
    q   = mag / sens;
    r   = mag - q * sens;
    if (s < 0) begin
      q = -q;
      r = -r;
    end
    pos = (pos + q) & 255;
    acc = r;
  endfunction

  initial begin
    int ax16 = 0, ay16 = 0, px16 = 0, py16 = 0;
    int ax5 = 0, ay5 = 0, px5 = 0, py5 = 0;
    int vx, vy;
    #200 resetn = 1'b1;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      if (n % 100 < 50) begin
        vx = int'($urandom_range(0, 14)) - 7;
        vy = int'($urandom_range(0, 14)) - 7;
      end else begin
        vx = int'($urandom_range(0, 511)) - 256;
        vy = int'($urandom_range(0, 511)) - 256;
      end
      @(posedge clk);
      dx <= 9'(vx);
      dy <= 9'(vy);
      newdata <= 1'b1;
      repeat (3) @(posedge clk);
      newdata <= 1'b0;
      repeat (2) @(posedge clk);
      ref_step(vx, 16, ax16, px16);
      ref_step(vy, 16, ay16, py16);
      ref_step(vx, 5, ax5, px5);
      ref_step(vy, 5, ay5, py5);
      checks++;
      if (x16 != 8'(px16) || y16 != 8'(py16) || x5 != 8'(px5) || y5 != 8'(py5)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: packet %0d d=(%0d,%0d) got %0d,%0d / %0d,%0d expected %0d,%0d / %0d,%0d",
                   n, vx, vy, x16, y16, x5, y5, px16, py16, px5, py5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
