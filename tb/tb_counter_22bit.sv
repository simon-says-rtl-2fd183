// tb_counter_22bit: checks the timebase at its full 22-bit size.
// A reference count runs alongside the design; every cycle the poll
// select, the three speed clocks and the debounce tick are compared with
// the taps of that count. Runs one full 2^22-cycle wrap and also measures
// the period of the slowest speed clock (2^22 cycles = ~2 s at 2 MHz).
module tb_counter_22bit;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] poll_sel;
  logic [2:0] speed_clk;
  logic db_tick;
  int checks = 0, failures = 0;

  counter_22bit dut (.clk, .rst, .poll_sel, .speed_clk, .db_tick);

  always #5 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [21:0] ref_cnt;
  logic        prev_slow;
  longint      cyc, last_rise, period;
  int          rises;

  initial begin
    ref_cnt = '0; prev_slow = 1'b0; cyc = 0; last_rise = -1; rises = 0; period = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat ((1 << 22) + (1 << 21) + 4000) begin
      @(posedge clk);
      ref_cnt = ref_cnt + 1'b1;
      cyc++;
      #1;
      checks++;
      if (poll_sel !== ref_cnt[16:15] || speed_clk !== ref_cnt[21:19] ||
          db_tick !== (ref_cnt[13:0] == 14'h2000)) begin
        failures++;
        if (failures < 10)
          $display("mismatch at count %h: poll %b spd %b tick %b", ref_cnt, poll_sel, speed_clk, db_tick);
      end
      if (speed_clk[2] && !prev_slow) begin
        if (last_rise >= 0) period = cyc - last_rise;
        last_rise = cyc;
        rises++;
      end
      prev_slow = speed_clk[2];
    end
    checks++;
    if (rises < 2 || period != (1 << 22)) begin
      failures++;
      $display("slow clock period %0d, rises %0d", period, rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
