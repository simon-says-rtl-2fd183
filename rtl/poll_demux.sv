// poll_demux: keypad column driver (1-of-4 demultiplexer, active low).
//
// Each cycle the 2-bit scan index from the timebase is decoded into four
// column lines of which exactly one is low: col_n[i] is 0 when sel == i.
// The lines are registered. While a debounced key is held (hold = 1) the
// register keeps its value, so the scan stops on the column of the pressed
// key and the keypad decoder can read a stable row/column pair.
// The decode and the freeze follow the original design, which gated the
// register's clock with ~Enable; here hold is a clock enable instead.
// Reset (asynchronous, active high) drives all columns high (none polled).
module poll_demux (
  input  logic       clk,
  input  logic       rst,
  input  logic       hold,
  input  logic [1:0] sel,
  output logic [3:0] col_n
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        col_n <= 4'b1111;
    else if (!hold) col_n <= ~(4'b0001 << sel);
  end

  // at most one column is driven low at any time
  a_one_column: assert property (@(posedge clk) disable iff (rst) $onehot0(~col_n));

endmodule
