// keypress_output: turns the held key into game-LED and speed-key signals.
//
// key is the latched key code ANDed with the debouncer's key_held, so it
// is non-zero only while a key is held down (0 otherwise; the key "0" is
// therefore never reported, which the game does not need).
//   key 1 -> led = 3'b001 (red)     key 4 -> speed = 2'b11 (slow, 2 s)
//   key 2 -> led = 3'b010 (yellow)  key 5 -> speed = 2'b01 (medium, 1 s)
//   key 3 -> led = 3'b100 (green)   key 6 -> speed = 2'b10 (fast, 0.5 s)
// every other value gives all zeros. led lights the game LEDs (through
// led_mux) and is read by the microcontroller as the pressed colour;
// speed is read by the microcontroller while it waits for a new game, and
// its code equals the clock select it then writes back (speed_sel_e).
// The mapping follows the original design. Purely combinational.
module keypress_output
  import simon_pkg::*;
(
  input  key_code_t  key,
  output logic [2:0] led,
  output logic [1:0] speed
);

  always_comb begin
    led   = 3'b000;
    speed = 2'b00;
    unique case (key)
      KEY_RED:    led   = 3'b001;
      KEY_YELLOW: led   = 3'b010;
      KEY_GREEN:  led   = 3'b100;
      KEY_SLOW:   speed = SPEED_2S;
      KEY_MEDIUM: speed = SPEED_1S;
      KEY_FAST:   speed = SPEED_HALF;
      default: ;
    endcase
  end

endmodule
