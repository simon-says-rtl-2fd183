// tb_simon_fpga: end-to-end game test of the FPGA at its full size.
//
// The FPGA runs at 2 MHz with every parameter at its default, so the game
// clocks are 0.5 s, 1 s and 2 s and the debouncer samples every ~8 ms.
// Around it sit a keypad model, a behavioural model of the microcontroller
// program, and a player process that watches the LEDs during playback and
// presses the keys back, with contact bounce at the start of each press.
// Four games are played:
//   fast  (key 6): levels 1-3 repeated, wrong colour at level 4  -> score 3
//   medium(key 5): wrong colour at level 1                       -> score 0
//   slow  (key 4): level 1 repeated, wrong colour at level 2     -> score 1
//   fast  (key 6): levels 1-10 repeated, wrong at level 11        -> score 10
// Checked: a short glitch is not taken as a key; every press gives exactly
// one rise of key_enable within the scan-plus-debounce bound and a fall
// after release; the column scan is frozen while a key is held; the
// coloured keys light their LED only while held and the speed keys give
// their speed code; the selected game clock has the period of the chosen
// speed; playback shows a pattern that grows by one entry per level with
// the earlier entries kept; the correct/wrong LEDs follow the game; the
// display shows the running high score (3, still 3, then 10) on both
// digits.
// Each mechanism is counted and one that never happened is a failure.
module tb_simon_fpga;
  import simon_pkg::*;

  localparam int CLK_HALF   = 250;            // ns, 2 MHz
  localparam int DB_PERIOD  = 1 << 14;        // debounce sample interval
  localparam int SCAN_ROUND = 4 * (1 << 15);  // one full column scan

  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] key_col_n, key_row_n;
  logic key_enable, speed_clk_out, led_sel, correct, game_over;
  logic led_correct, led_wrong, digit_sel, digit_sel_n;
  logic [1:0] speed_key, rand_out, speed_sel_raw;
  logic [2:0] game_led, pattern;
  logic [5:0] hiscore;
  seg_t seg_n;

  logic       kp_pressed = 1'b0;
  logic [3:0] kp_key = 4'h0;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_glitch_rejected = 0, n_presses = 0, n_bounced = 0, n_freeze = 0;
  int n_led_keys = 0, n_speed_keys = 0, n_playback_steps = 0, n_levels_ok = 0;
  int n_game_over = 0, n_correct_led = 0, n_display = 0;
  int n_speed_period [3] = '{0, 0, 0};
  int n_enable_rises = 0;

  simon_fpga dut (
    .clk, .rst, .key_col_n, .key_row_n, .key_enable, .speed_key, .rand_out,
    .speed_clk_out, .game_led, .pattern, .led_sel,
    .speed_sel(speed_sel_e'(speed_sel_raw)), .hiscore, .correct, .game_over,
    .led_correct, .led_wrong, .seg_n, .digit_sel, .digit_sel_n
  );

  keypad_model u_keypad (
    .col_n(key_col_n), .pressed(kp_pressed), .key(kp_key), .row_n(key_row_n)
  );

  simon_mc_model u_mc (
    .clk, .speed_key, .rand_out, .speed_clk_in(speed_clk_out), .game_led,
    .pattern, .led_sel, .speed_sel(speed_sel_raw), .hiscore, .correct, .game_over
  );

  always #CLK_HALF clk = ~clk;
  always @(posedge clk) cycle++;
  always @(posedge key_enable) n_enable_rises++;
  always @(posedge led_correct) n_correct_led++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // game clock period: measured between rising edges under one select;
  // the first rise after a select change may be a switching artefact
  longint last_rise = -1;
  logic [1:0] last_sel = 2'b00;
  int rises_same_sel = 0;
  always @(posedge speed_clk_out) begin
    if (last_sel == speed_sel_raw) rises_same_sel++;
    else                           rises_same_sel = 0;
    if (rises_same_sel >= 2 && speed_sel_raw != 0) begin
      longint p;
      int idx;
      p = cycle - last_rise;
      idx = (speed_sel_raw == 2'd2) ? 0 : (speed_sel_raw == 2'd1) ? 1 : 2;
      check(p == (longint'(1) << (20 + idx)), $sformatf("game clock period %0d", p));
      n_speed_period[idx]++;
    end
    last_rise = cycle;
    last_sel  = speed_sel_raw;
  end

  // press one key: bounce, hold, release; check the FPGA's response
  task automatic press(input logic [3:0] k);
    int rises0 = n_enable_rises;
    int waited = 0;
    logic [3:0] cols;
    // contact bounce
    kp_key = k;
    for (int i = 0; i < 6; i++) begin
      kp_pressed = ~kp_pressed;
      repeat ($urandom_range(50, 400)) @(posedge clk);
    end
    kp_pressed = 1'b1;
    n_bounced++;
    while (!key_enable && waited < SCAN_ROUND + 3 * DB_PERIOD) begin
      @(posedge clk);
      waited++;
    end
    check(key_enable, $sformatf("key %h not accepted in %0d cycles", k, waited));
    repeat (2) @(posedge clk);
    cols = key_col_n;
    if (k inside {[4'h1:4'h3]}) begin
      check(game_led == (3'b001 << (k - 1)), $sformatf("key %h: LEDs %b", k, game_led));
      n_led_keys++;
    end
    if (k inside {[4'h4:4'h6]}) begin
      logic [1:0] exp_code = (k == 4'h4) ? 2'd3 : (k == 4'h5) ? 2'd1 : 2'd2;
      check(speed_key == exp_code, $sformatf("key %h: speed code %0d", k, speed_key));
      n_speed_keys++;
    end
    // hold for a few debounce samples; the scan must stay on this column
    repeat ($urandom_range(3, 5) * DB_PERIOD) begin
      @(posedge clk);
      if (key_col_n != cols) break;
    end
    check(key_col_n == cols, "column scan moved while a key was held");
    n_freeze++;
    kp_pressed = 1'b0;
    waited = 0;
    while (key_enable && waited < 3 * DB_PERIOD) begin
      @(posedge clk);
      waited++;
    end
    check(!key_enable, "key_enable did not fall after release");
    check(n_enable_rises == rises0 + 1, $sformatf("%0d enable rises for one press", n_enable_rises - rises0));
    check(game_led == 3'b000 || led_sel, "key LEDs still on after release");
    check(speed_key == 2'b00, "speed code still present after release");
    n_presses++;
    repeat ($urandom_range(1000, 20000)) @(posedge clk);
  endtask

  // watch one playback; returns the entries shown
  task automatic watch_playback(ref logic [2:0] seen [$]);
    logic [2:0] prev = 3'b000;
    seen.delete();
    wait (led_sel == 1'b1);
    while (led_sel) begin
      @(posedge clk);
      if (led_sel && prev == 3'b000 && game_led != 3'b000) begin
        seen.push_back(game_led);
        n_playback_steps++;
      end
      prev = game_led;
    end
  endtask

  function automatic logic [3:0] key_for(logic [2:0] led);
    return (led == 3'b001) ? 4'h1 : (led == 3'b010) ? 4'h2 : 4'h3;
  endfunction

  task automatic check_display(input int hs);
    seg_t ones_seg = 'x, tens_seg = 'x;
    bit got_ones = 0, got_tens = 0;
    repeat (64) begin
      @(posedge clk);
      #1;
      if (digit_sel)  begin ones_seg = seg_n; got_ones = 1; end
      else            begin tens_seg = seg_n; got_tens = 1; end
      check(digit_sel_n == !digit_sel, "digit selects not complementary");
    end
    check(got_ones && got_tens, "display did not alternate digits");
    check(ones_seg == hex_to_seg(4'(hs % 10)), $sformatf("ones digit %b for %0d", ones_seg, hs));
    check(tens_seg == hex_to_seg(4'(hs / 10)), $sformatf("tens digit %b for %0d", tens_seg, hs));
    n_display++;
  endtask

  // one game: speed key, then fail_level-1 levels correct, then a wrong colour
  task automatic play_game(input logic [3:0] speed_k, input int fail_level,
                           input int fail_index, inout int high);
    logic [2:0] seen [$];
    logic [2:0] known [$];
    press(speed_k);
    check(!led_wrong, "wrong LED still on after a new game started");
    for (int lvl = 1; lvl <= fail_level; lvl++) begin
      watch_playback(seen);
      $display("@%0d speed key %h level %0d: pattern of %0d shown", cycle, speed_k, lvl, seen.size());
      check(seen.size() == lvl, $sformatf("level %0d played %0d entries", lvl, seen.size()));
      for (int i = 0; i < known.size() && i < seen.size(); i++)
        check(seen[i] == known[i], "earlier pattern entry changed");
      foreach (seen[i]) check($onehot(seen[i]), "pattern entry is not one LED");
      known = seen;
      for (int i = 0; i < seen.size(); i++) begin
        if (lvl == fail_level && i == fail_index) begin
          logic [3:0] k = key_for(seen[i]);
          press((k == 4'h3) ? 4'h1 : k + 4'h1);
          break;
        end
        press(key_for(seen[i]));
      end
      if (lvl < fail_level) begin
        n_levels_ok++;
      end
    end
    wait (led_wrong == 1'b1);
    n_game_over++;
    if (fail_level - 1 > high) high = fail_level - 1;
    repeat (20) @(posedge clk);
    check(hiscore == 6'(high), $sformatf("high score %0d expected %0d", hiscore, high));
    check_display(high);
  endtask

  initial begin
    int high;
    high = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (100) @(posedge clk);
    check(!key_enable && game_led == 3'b000 && speed_key == 2'b00, "outputs not idle after reset");
    // a glitch far shorter than one debounce sample is not a key press
    begin
      int rises0;
      rises0 = n_enable_rises;
      for (int i = 0; i < 8; i++) begin
        wait (key_col_n[3] == 1'b0);         // column of key 1 is polled
        kp_key = 4'h1;
        kp_pressed = 1'b1;
        repeat (200) @(posedge clk);
        kp_pressed = 1'b0;
        repeat (3 * DB_PERIOD) @(posedge clk);
      end
      check(n_enable_rises == rises0, "glitch accepted as a key press");
      if (n_enable_rises == rises0) n_glitch_rejected++;
    end
    play_game(4'h6, 4, 0, high);   // fast
    play_game(4'h5, 1, 0, high);   // medium
    play_game(4'h4, 2, 1, high);   // slow
    play_game(4'h6, 11, 5, high);  // fast, long: two-digit high score

    // every mechanism must have happened
    check(n_glitch_rejected > 0, "no glitch rejected");
    check(n_bounced > 0 && n_presses > 0, "no bounced press");
    check(n_freeze > 0, "no scan freeze");
    check(n_led_keys > 0, "no colour key");
    check(n_speed_keys == 4, "speed keys");
    check(n_speed_period[0] > 0, "fast clock never measured");
    check(n_speed_period[1] > 0, "medium clock never measured");
    check(n_speed_period[2] > 0, "slow clock never measured");
    check(n_playback_steps > 0, "no playback");
    check(n_levels_ok >= 14, "too few levels completed");
    check(n_correct_led >= 4, "correct LED never lit");
    check(n_game_over == 4 && u_mc.games == 4, "game over count");
    check(u_mc.new_high == 2, "high score should have been raised twice");
    check(n_display == 4, "display checks");
    check(u_mc.rand_vals_seen != 3'b000, "no random value");
    $display("presses %0d, playback steps %0d, levels passed %0d, games %0d, random values seen %b",
             n_presses, n_playback_steps, n_levels_ok, n_game_over, u_mc.rand_vals_seen);
    $display("speed periods measured: fast %0d medium %0d slow %0d",
             n_speed_period[0], n_speed_period[1], n_speed_period[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
