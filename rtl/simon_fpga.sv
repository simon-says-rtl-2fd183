// simon_fpga: FPGA glue logic of the Simon Says game.
//
// The game itself (pattern storage, playback timing, checking the player,
// high score) runs as software on a microcontroller; this FPGA does the
// fast and the electrical work around it:
//   * scans the 4x4 keypad (poll_demux drives one column low at a time),
//     debounces a press (debounce, on the AND of the four sense lines) and
//     decodes the key (keypad_decoder); the scan freezes while a key is held
//   * latches the key code when the press is accepted (hold_reg) and, while the key is
//     held, turns keys 1-3 into the red/yellow/green LED lines and keys 4-6
//     into the two speed-key lines (keypress_output)
//   * lets the microcontroller switch the game LEDs between the player's
//     presses and its own pattern (led_mux); the same three lines are read
//     back by the microcontroller as the player's answer
//   * divides the 2 MHz clock into 2 s, 1 s and 0.5 s game-speed clocks and
//     sends the one the microcontroller selects (counter_22bit, clk_mux)
//   * offers a 0..2 counter as random number (rand_counter)
//   * on the rising edge of game_over latches the high score as two decimal
//     digits and shows them on a two-digit multiplexed display
//     (hs_decoder, hold_reg, seg_display)
//   * buffers the right/wrong signals to their LEDs
// All logic runs on clk with an asynchronous active-high reset. The block
// structure, counter taps, codes and mappings follow the original design;
// the derived and gated clocks of the original are replaced here by clock
// enables and edge detection on clk, and game_over, the only
// microcontroller signal used as an edge, passes a two-flop synchronizer
// before its rising edge is detected (high-score digits latched 3 clocks
// after game_over rises).
// Microcontroller inputs that only steer combinational muxes (pattern,
// led_sel, speed_sel) are used directly. Latencies: a key must read
// "pressed" at two debounce samples in a row (~8 ms apart) before
// key_enable rises; the LED and speed lines follow one clock later.
module simon_fpga
  import simon_pkg::*;
#(
  parameter int unsigned CNT_WIDTH   = 22,
  parameter int unsigned POLL_LSB    = 15,
  parameter int unsigned DB_BIT      = 13,
  parameter int unsigned SPEED_LSB   = 19,
  parameter int unsigned REFRESH_BIT = 3
) (
  input  logic       clk,
  input  logic       rst,
  // keypad
  output logic [3:0] key_col_n,    // column drive, one low at a time
  input  logic [3:0] key_row_n,    // sense lines, pulled high on the board
  // to the microcontroller
  output logic       key_enable,   // debounced "a key is held"
  output logic [1:0] speed_key,    // speed code while key 4/5/6 is held
  output logic [1:0] rand_out,     // random LED number 0..2
  output logic       speed_clk_out,// selected game-speed clock
  // game LEDs (also read by the microcontroller)
  output logic [2:0] game_led,     // [0] red, [1] yellow, [2] green
  // from the microcontroller
  input  logic [2:0] pattern,      // LED pattern to show, same bit order
  input  logic       led_sel,      // 1: show pattern, 0: show key presses
  input  speed_sel_e speed_sel,    // game-speed clock select
  input  logic [5:0] hiscore,      // high score, binary
  input  logic       correct,      // "pattern right"
  input  logic       game_over,    // "pattern wrong", latches the high score
  // right/wrong LEDs
  output logic       led_correct,
  output logic       led_wrong,
  // seven-segment display
  output seg_t       seg_n,        // {a..g}, active low, shared by both digits
  output logic       digit_sel,    // high: ones digit on the segment lines
  output logic       digit_sel_n   // inverse, for the other digit's transistor
);

  logic [1:0] poll_sel;
  logic [2:0] speed_clk;
  logic       db_tick;
  logic       key_idle, key_held, key_press;
  key_code_t  key_now, key_latched, key_active;
  logic [2:0] key_led;
  bcd_t       hs_ones, hs_tens, disp_ones, disp_tens;
  logic [2:0] game_over_sync;
  logic       game_over_rise;

  // ---------------- timebase ----------------
  counter_22bit #(
    .WIDTH(CNT_WIDTH), .POLL_LSB(POLL_LSB), .DB_BIT(DB_BIT), .SPEED_LSB(SPEED_LSB)
  ) u_counter (
    .clk, .rst, .poll_sel, .speed_clk, .db_tick
  );

  // ---------------- keypad path ----------------
  poll_demux u_poll (
    .clk, .rst, .hold(key_held), .sel(poll_sel), .col_n(key_col_n)
  );

  assign key_idle = &key_row_n;

  debounce u_debounce (
    .clk, .rst, .tick(db_tick), .idle(key_idle), .key_held, .press(key_press)
  );

  keypad_decoder u_decoder (
    .col_n(key_col_n), .row_n(key_row_n), .key(key_now)
  );

  // loads on the edge that raises key_held, so key_active never shows
  // the previous key
  hold_reg #(.W(4)) u_key_reg (
    .clk, .rst, .load(key_press), .d(key_now), .q(key_latched)
  );

  assign key_active = key_latched & {4{key_held}};

  keypress_output u_keyout (
    .key(key_active), .led(key_led), .speed(speed_key)
  );

  assign key_enable = key_held;

  // the scan stays on the pressed key's column while the key is held
  a_scan_frozen: assert property (@(posedge clk) disable iff (rst)
                                  key_held |=> $stable(key_col_n));

  // ---------------- game LEDs ----------------
  led_mux u_led_mux (
    .sel(led_sel), .key_led, .pattern, .led(game_led)
  );

  assign led_correct = correct;
  assign led_wrong   = game_over;

  // ---------------- game speed and random number ----------------
  clk_mux u_clk_mux (
    .sel(speed_sel), .speed_clk, .clk_out(speed_clk_out)
  );

  rand_counter u_rand (
    .clk, .rst, .value(rand_out)
  );

  // ---------------- high score display ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) game_over_sync <= 3'b000;
    else     game_over_sync <= {game_over_sync[1:0], game_over};
  end

  assign game_over_rise = game_over_sync[1] && !game_over_sync[2];

  hs_decoder u_hs_dec (
    .score(hiscore), .ones(hs_ones), .tens(hs_tens)
  );

  hold_reg #(.W(4)) u_ones_reg (
    .clk, .rst, .load(game_over_rise), .d(hs_ones), .q(disp_ones)
  );

  hold_reg #(.W(4)) u_tens_reg (
    .clk, .rst, .load(game_over_rise), .d(hs_tens), .q(disp_tens)
  );

  seg_display #(.REFRESH_BIT(REFRESH_BIT)) u_display (
    .clk, .rst, .ones(disp_ones), .tens(disp_tens),
    .seg_n, .digit_sel, .digit_sel_n
  );

endmodule
