// simon_mc_model: behavioural model of the game microcontroller (testbench
// only, not synthesizable).
//
// Models the game program that runs on the microcontroller next to the
// FPGA, at the level of the signals it exchanges with it:
//   1. wait for a speed code on speed_key, write the matching clock select
//      to speed_sel (slow 3, medium 1, fast 2)
//   2. empty the pattern, level = 0
//   3. new entry: read rand_out (0..2) and append LED 1 << rand_out, turn
//      the "correct" LED on, level = level + 1
//   4. playback, one step per rising edge of the selected speed clock:
//      LEDs off (led_sel = 1, correct off), entry on, off, next entry on,
//      ..., off; after the last "off" hand the LEDs back to the player
//      (led_sel = 0)
//   5. wait for each rising edge of the player's LED lines (game_led going
//      from all-off to a colour) and compare it with the next entry; when
//      the whole pattern is repeated go to 3
//   6. on a wrong colour: score = level - 1, keep the larger of score and
//      high score, put the high score on hiscore, raise game_over (red LED,
//      latches the display) and go to 1; game_over falls when the next
//      game starts.
// The program reacts within one clock of the FPGA clock, far faster than
// any game event, which is all the FPGA relies on.
module simon_mc_model (
  input  logic       clk,
  input  logic [1:0] speed_key,
  input  logic [1:0] rand_out,
  input  logic       speed_clk_in,
  input  logic [2:0] game_led,
  output logic [2:0] pattern,
  output logic       led_sel,
  output logic [1:0] speed_sel,
  output logic [5:0] hiscore,
  output logic       correct,
  output logic       game_over
);

  logic [2:0] stack [$];
  int         level;
  int         score;
  int         games = 0;
  int         new_high = 0;
  logic [2:0] rand_vals_seen = '0;

  initial begin
    pattern = '0; led_sel = 1'b0; speed_sel = '0; hiscore = '0;
    correct = 1'b0; game_over = 1'b0;
    forever begin
      // 1. speed selection
      do @(posedge clk); while (speed_key == 2'b00);
      speed_sel = speed_key;
      led_sel = 1'b0; pattern = '0; correct = 1'b0; game_over = 1'b0;
      // 2. new game
      stack.delete();
      level = 0;
      forever begin : one_level
        bit wrong;
        // 3. new entry
        stack.push_back(3'b001 << rand_out);
        rand_vals_seen[rand_out] = 1'b1;
        correct = 1'b1;
        level++;
        // 4. playback
        foreach (stack[i]) begin
          wait_speed_edge();
          led_sel = 1'b1; pattern = '0; correct = 1'b0;
          wait_speed_edge();
          pattern = stack[i];
        end
        wait_speed_edge();
        pattern = '0;
        led_sel = 1'b0;
        // 5. player's answer
        wrong = 1'b0;
        foreach (stack[i]) begin
          logic [2:0] got;
          wait_key(got);
          if (got != stack[i]) begin
            wrong = 1'b1;
            break;
          end
        end
        if (wrong) break;
      end
      // 6. game over
      score = level - 1;
      if (score >= int'(hiscore)) begin
        if (score > int'(hiscore)) new_high++;
        hiscore = 6'(score);
      end
      @(posedge clk);
      game_over = 1'b1;
      games++;
    end
  end

  task automatic wait_speed_edge();
    @(posedge speed_clk_in);
    @(posedge clk);
  endtask

  task automatic wait_key(output logic [2:0] got);
    logic [2:0] prev;
    prev = game_led;
    forever begin
      @(posedge clk);
      if (prev == 3'b000 && game_led != 3'b000) break;
      prev = game_led;
    end
    got = game_led;
  endtask

endmodule
