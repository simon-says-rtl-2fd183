// debounce: key-press debouncer producing the "Enable" (key held) signal.
//
// idle is the AND of the four keypad sense lines: 1 when no key is pressed
// (all pulled high), 0 while the polled column has a closed key. The input
// is sampled only when tick is high (every ~8 ms). A five-state machine
// counts consecutive samples:
//   ZERO  : after reset
//   ONE   : one  "idle" sample   TWO  : two or more "idle" samples
//   THREE : one  "pressed" sample FOUR : two or more "pressed" samples
// Any sample of the opposite value moves to ONE or THREE. key_held is set
// on entering FOUR (two pressed samples in a row), cleared on entering TWO
// or ZERO (two idle samples in a row) and otherwise holds, so a single
// bounce neither starts nor ends a press. press is a one-cycle pulse,
// combinational, in the cycle whose clock edge raises key_held; the key
// register loads on it so that the key code is valid together with
// key_held.
// The states, transitions and output rule follow the original design. The
// original built key_held as a combinational feedback loop; here it is a
// flip-flop updated together with the state, which gives the same value
// in every state without a loop. Reset is asynchronous (the original used
// a synchronous reset on its slow clock).
module debounce (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  logic idle,
  output logic key_held,
  output logic press
);

  typedef enum logic [2:0] {ZERO, ONE, TWO, THREE, FOUR} db_state_e;

  db_state_e state, next_state;
  logic      next_held;

  always_comb begin
    unique case (state)
      ZERO, ONE, TWO: next_state = idle ? ((state == ZERO) ? ONE : TWO) : THREE;
      THREE, FOUR:    next_state = idle ? ONE : FOUR;
      default:        next_state = ZERO;
    endcase
    next_held = (next_state == FOUR) ||
                (key_held && next_state != TWO && next_state != ZERO);
  end

  assign press = tick && next_held && !key_held;

  // the output moves only at sample instants
  a_held_on_tick: assert property (@(posedge clk) disable iff (rst)
                                   !tick |=> $stable(key_held));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= ZERO;
      key_held <= 1'b0;
    end else if (tick) begin
      state    <= next_state;
      key_held <= next_held;
    end
  end

endmodule
