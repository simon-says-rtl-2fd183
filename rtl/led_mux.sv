// led_mux: chooses what the three game LEDs show (2-to-1 mux, 3 bits).
//
// sel = 0: the LEDs follow the player's key presses (key_led);
// sel = 1: they show the microcontroller's pattern (pattern).
// Bit 0 is the red LED, bit 1 yellow, bit 2 green, all active high. The
// output also goes back to the microcontroller, which reads the player's
// presses from it. Follows the original design. Purely combinational.
module led_mux (
  input  logic       sel,
  input  logic [2:0] key_led,
  input  logic [2:0] pattern,
  output logic [2:0] led
);

  assign led = sel ? pattern : key_led;

endmodule
