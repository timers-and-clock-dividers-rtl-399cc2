// keypad_model: behavioural model of a passive 4x4 matrix keypad with
// pulled-up column lines, for simulation only.
//
// When `press` is high, the key at row `key_r`, column `key_c` connects that
// row line to that column line: the column reads low if the row is driven
// low. All other columns read high (pull-ups). Only one key is modelled
// pressed at a time. The model is combinational.
module keypad_model (
  input  logic [3:0]  row,
  input  logic        press,
  input  int unsigned key_r,
  input  int unsigned key_c,
  output logic [3:0]  col
);

  always_comb begin
    col = 4'b1111;
    for (int c = 0; c < 4; c++)
      if (press && key_c == c && key_r < 4 && row[key_r] == 1'b0)
        col[c] = 1'b0;
  end

endmodule
