// tb_hs_decoder: all 64 scores; the reference digits are found by
// repeated subtraction of ten.
module tb_hs_decoder;
  import simon_pkg::*;
  logic [5:0] score;
  bcd_t ones, tens;
  int checks = 0, failures = 0;

  hs_decoder dut (.score, .ones, .tens);

  initial begin
    for (int s = 0; s < 64; s++) begin
      int t, o;
      t = 0; o = s;
      while (o >= 10) begin o -= 10; t++; end
      score = 6'(s);
      #1;
      checks++;
      if (ones !== 4'(o) || tens !== 4'(t)) begin
        failures++;
        $display("score %0d: %0d%0d", s, tens, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
