// tb_key_slot_mux: checks the slot selector with random key codes for every
// select value.
module tb_key_slot_mux;
  logic [47:0] key_code;
  logic [1:0]  sel;
  logic [15:0] code;
  int checks = 0, failures = 0;

  key_slot_mux dut (.key_code(key_code), .sel(sel), .code(code));

  initial begin
    for (int n = 0; n < 50; n++) begin
      logic [15:0] s[3];
      foreach (s[i]) s[i] = 16'($urandom);
      key_code = {s[2], s[1], s[0]};
      for (int k = 0; k < 4; k++) begin
        sel = 2'(k);
        #1;
        checks++;
        if (code !== ((k < 3) ? s[k] : 16'h0000)) begin
          failures++;
          $display("FAIL: sel %0d code %h", k, code);
        end
      end
    end
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
