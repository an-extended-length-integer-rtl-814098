// keypad_model: a 5 x 5 key matrix with pull-ups. While key `pressed` (code =
// row*5 + column) is down, its row line follows its column line; all other row
// lines stay high. pressed = -1 means no key is down.
module keypad_model (
  input  logic [4:0] kp_col,
  output logic [4:0] kp_row,
  input  int         pressed
);
  always_comb begin
    kp_row = '1;
    if (pressed >= 0 && pressed < 25)
      kp_row[pressed / 5] = kp_col[pressed % 5];
  end
endmodule
