// tb_seg_display: random digit pairs. Checks that digit_sel and
// digit_sel_n are always opposite, that digit_sel toggles every 8 clocks
// (REFRESH_BIT = 3), and that the segment lines show the ones digit while
// digit_sel is high and the tens digit while it is low. The expected
// segment patterns are built here from the list of lit segments of each
// numeral, independently of the design's table.
module tb_seg_display;
  import simon_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  bcd_t ones = '0, tens = '0;
  seg_t seg_n;
  logic digit_sel, digit_sel_n, prev_sel;
  int checks = 0, failures = 0, since_toggle, toggles = 0;

  seg_display dut (.clk, .rst, .ones, .tens, .seg_n, .digit_sel, .digit_sel_n);

  always #5 clk = ~clk;

  // segments lit for each hex digit, letters a..g (the 9 has no bottom bar)
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic seg_t expect_seg(bcd_t v);
    seg_t s = 7'b111_1111;
    string l = lit[v];
    for (int i = 0; i < l.len(); i++) s[6 - (l[i] - "a")] = 1'b0;
    return s;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    @(negedge clk) rst = 1'b0;
    prev_sel = digit_sel; since_toggle = 0;
    repeat (4000) begin
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) begin
        ones = 4'($urandom);
        tens = 4'($urandom);
      end
      #1;
      checks++;
      if (digit_sel_n !== ~digit_sel) failures++;
      checks++;
      if (seg_n !== expect_seg(digit_sel ? ones : tens)) begin
        failures++;
        $display("sel %b ones %h tens %h: seg %b exp %b", digit_sel, ones, tens, seg_n, expect_seg(digit_sel ? ones : tens));
      end
      since_toggle++;
      if (digit_sel !== prev_sel) begin
        checks++;
        if (toggles > 0 && since_toggle != 8) begin
          failures++;
          $display("digit period %0d", since_toggle);
        end
        toggles++;
        since_toggle = 0;
      end
      prev_sel = digit_sel;
    end
    checks++;
    if (toggles < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
