// tb_debounce: feeds random key/idle samples, with random gaps between
// sample ticks, and compares key_held with a run-length reference: it
// rises after two "pressed" samples in a row, falls after two "idle"
// samples in a row, and otherwise keeps its value. Also checks that input
// changes between ticks are ignored and that a single bounce sample does
// not change the output. press must pulse only with the tick that
// raises key_held.
module tb_debounce;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0, idle = 1'b1;
  logic key_held, press;
  int checks = 0, failures = 0;
  int run_idle, run_press;
  logic ref_held;
  int rises = 0, bounces = 0;

  debounce dut (.clk, .rst, .tick, .idle, .key_held, .press);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sample(input logic v);
    logic prev = ref_held;
    // random noise between ticks must be ignored
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      idle = 1'($urandom);
      tick = 1'b0;
      #1;
      checks++;
      if (press !== 1'b0) failures++;
    end
    @(negedge clk);
    idle = v;
    tick = 1'b1;
    #1;
    checks++;
    if (press !== (!prev && (v == 1'b0) && run_press >= 1)) begin
      failures++;
      $display("press pulse %b wrong", press);
    end
    if (v) begin run_idle++; run_press = 0; end
    else   begin run_press++; run_idle = 0; end
    if (run_press >= 2) ref_held = 1'b1;
    if (run_idle >= 2)  ref_held = 1'b0;
    if (!prev && ref_held) rises++;
    @(posedge clk);
    #1;
    tick = 1'b0;
    checks++;
    if (key_held !== ref_held) begin
      failures++;
      $display("sample %b: key_held %b expected %b", v, key_held, ref_held);
    end
  endtask

  initial begin
    run_idle = 0; run_press = 0; ref_held = 1'b0;
    #12;
    @(negedge clk) rst = 1'b0;
    checks++;
    if (key_held !== 1'b0) failures++;
    // directed: press, single bounce while held, release
    sample(1); sample(1);
    sample(0); sample(0);              // accepted press
    sample(1); sample(0);              // one bounce: still held
    if (key_held) bounces++;
    sample(0); sample(1); sample(1);   // released
    sample(0); sample(1);              // single low glitch: not a press
    // random
    repeat (3000) sample(($urandom_range(0, 2) != 0) ? 1'b1 : 1'b0);
    checks++;
    if (rises < 10 || bounces != 1) begin
      failures++;
      $display("too few presses exercised: %0d", rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
