// hold_reg: 4-bit register with load enable ("Flip Flops" of the design).
//
// Three of these hold values that must stay put while other signals move:
// the decoded key, captured when the debouncer accepts a press and held
// until the next press (the keypad lines may bounce meanwhile), and the
// two high-score digits, captured when the microcontroller signals game
// over and shown until the next game over. The original design clocked
// the flip-flops directly from those control signals; here they run on
// the system clock and load is a one-cycle pulse generated by the caller
// in the cycle of that event, so q takes d on the same clock edge on
// which the event becomes visible elsewhere. Reset (asynchronous, active
// high) clears q, as in the original.
module hold_reg #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
