// keypad_decoder: turns the scanned 4x4 keypad lines into the key's value.
//
// col_n are the four column lines the FPGA drives (one low at a time),
// row_n the four sense lines read back from the keypad (pulled high, low
// where a closed key joins them to the low column). When exactly one
// column and exactly one row are low the output is the hex value printed
// on that key; any other combination (no key, several keys) gives 4'hF,
// the same code as key F.
// Keypad layout (rows top to bottom, columns left to right):
//      col_n[3] col_n[2] col_n[1] col_n[0]
//   row_n[2]:  1   2   3   C
//   row_n[0]:  4   5   6   D
//   row_n[1]:  7   8   9   E
//   row_n[3]:  A   0   B   F
// The wiring and the key values follow the original design; it is
// written here as a row/column lookup. Purely combinational.
module keypad_decoder
  import simon_pkg::*;
(
  input  logic [3:0] col_n,
  input  logic [3:0] row_n,
  output key_code_t  key
);

  logic [1:0] col_idx, row_idx;
  logic       col_ok, row_ok;

  // Column index 0..3 from the left; row index 0..3 from the top.
  always_comb begin
    col_ok  = 1'b1;
    col_idx = 2'd0;
    unique case (col_n)
      4'b0111: col_idx = 2'd0;
      4'b1011: col_idx = 2'd1;
      4'b1101: col_idx = 2'd2;
      4'b1110: col_idx = 2'd3;
      default: col_ok  = 1'b0;
    endcase
    row_ok  = 1'b1;
    row_idx = 2'd0;
    unique case (row_n)
      4'b1011: row_idx = 2'd0;
      4'b1110: row_idx = 2'd1;
      4'b1101: row_idx = 2'd2;
      4'b0111: row_idx = 2'd3;
      default: row_ok  = 1'b0;
    endcase
  end

  always_comb begin
    key = 4'hF;
    if (col_ok && row_ok) begin
      unique case ({row_idx, col_idx})
        4'b00_00: key = 4'h1;  4'b00_01: key = 4'h2;
        4'b00_10: key = 4'h3;  4'b00_11: key = 4'hC;
        4'b01_00: key = 4'h4;  4'b01_01: key = 4'h5;
        4'b01_10: key = 4'h6;  4'b01_11: key = 4'hD;
        4'b10_00: key = 4'h7;  4'b10_01: key = 4'h8;
        4'b10_10: key = 4'h9;  4'b10_11: key = 4'hE;
        4'b11_00: key = 4'hA;  4'b11_01: key = 4'h0;
        4'b11_10: key = 4'hB;  default:  key = 4'hF;
      endcase
    end
  end

endmodule
