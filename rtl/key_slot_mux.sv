// key_slot_mux: picks one of the keyboard controller's three key slots for
// display.
//
// Combinational. sel = 0, 1, 2 selects slot 0, 1, 2 of key_code (slot i is
// key_code[16*i +: 16]); sel = 3 selects nothing and gives 0000. In the
// keyboard demonstration design sel comes from board switches SW[1:0], so
// any of the held keys can be read on the displays.
//
// Choosing a slot with the switches is the exercise proposed for the
// keyboard example; the two-bit binary encoding and the blank value for
// sel = 3 are this design's choices.
module key_slot_mux (
  input  logic [47:0] key_code,
  input  logic [1:0]  sel,
  output logic [15:0] code
);

  always_comb begin
    unique case (sel)
      2'd0:    code = key_code[15:0];
      2'd1:    code = key_code[31:16];
      2'd2:    code = key_code[47:32];
      default: code = 16'h0000;
    endcase
  end

endmodule
