// rand_counter: modulo-3 counter used as the game's random number.
//
// Counts 0, 1, 2, 0, ... on every system clock. The microcontroller reads
// it when it needs the next pattern entry; since that instant depends on
// when the player finishes, the value read is effectively random and is
// always a valid LED number (0 red, 1 yellow, 2 green). Counting and
// wrap-around follow the original design; the original's source for this
// block is not given, so this implementation is its own. The unused code
// 3 returns to 0. Reset (asynchronous, active high) starts it at 0.
module rand_counter (
  input  logic       clk,
  input  logic       rst,
  output logic [1:0] value
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                 value <= 2'd0;
    else if (value >= 2'd2)  value <= 2'd0;
    else                     value <= value + 2'd1;
  end

endmodule
