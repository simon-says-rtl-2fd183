// keypad_model: behavioural 4x4 switch-matrix keypad (testbench only).
//
// The sense lines idle high (pull-up resistors). While a key is closed
// (pressed = 1) the sense line of its row follows the drive line of its
// column, so it reads low exactly when the FPGA polls that column.
// Layout: rows 1 2 3 C / 4 5 6 D / 7 8 9 E / A 0 B F on sense lines
// row_n[2], [0], [1], [3]; columns left to right on col_n[3], [2], [1], [0].
module keypad_model (
  input  logic [3:0] col_n,
  input  logic       pressed,
  input  logic [3:0] key,
  output logic [3:0] row_n
);

  int row_line, col_line;

  always_comb begin
    unique case (key)
      4'h1, 4'h2, 4'h3, 4'hC: row_line = 2;
      4'h4, 4'h5, 4'h6, 4'hD: row_line = 0;
      4'h7, 4'h8, 4'h9, 4'hE: row_line = 1;
      default:                row_line = 3;
    endcase
    unique case (key)
      4'h1, 4'h4, 4'h7, 4'hA: col_line = 3;
      4'h2, 4'h5, 4'h8, 4'h0: col_line = 2;
      4'h3, 4'h6, 4'h9, 4'hB: col_line = 1;
      default:                col_line = 0;
    endcase
    row_n = 4'b1111;
    if (pressed) row_n[row_line] = col_n[col_line];
  end

endmodule
