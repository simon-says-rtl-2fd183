// hs_decoder: splits the 6-bit binary high score into two decimal digits.
//
// score (0..63) comes from the microcontroller; ones = score mod 10 and
// tens = score div 10 (0..6), both BCD, feed the two-digit display. The
// original design did this with a 64-entry case table; here it is written
// as the arithmetic the table encodes. Purely combinational.
module hs_decoder
  import simon_pkg::*;
(
  input  logic [5:0] score,
  output bcd_t       ones,
  output bcd_t       tens
);

  always_comb begin
    ones = 4'(score % 6'd10);
    tens = 4'(score / 6'd10);
  end

endmodule
