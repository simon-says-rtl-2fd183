// tb_keypad_decoder: applies all 256 combinations of column drive and row
// sense lines. The reference is the keypad's printed layout
//   1 2 3 C / 4 5 6 D / 7 8 9 E / A 0 B F
// with columns on col_n[3..0] (left to right) and rows on row_n[2], [0],
// [1], [3] (top to bottom). Every combination other than exactly one low
// column and one low row must give 4'hF.
module tb_keypad_decoder;
  import simon_pkg::*;
  logic [3:0] col_n, row_n;
  key_code_t  key;
  int checks = 0, failures = 0;

  keypad_decoder dut (.col_n, .row_n, .key);

  string layout [4] = '{"123C", "456D", "789E", "A0BF"};
  int    row_line [4] = '{2, 0, 1, 3};   // sense line of each row
  int    col_line [4] = '{3, 2, 1, 0};   // drive line of each column

  function automatic logic [3:0] hexval(byte c);
    if (c >= "0" && c <= "9") return 4'(c - "0");
    return 4'(c - "A" + 10);
  endfunction

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int r = 0; r < 16; r++) begin
        logic [3:0] exp_key;
        col_n = 4'(c);
        row_n = 4'(r);
        exp_key = 4'hF;
        for (int rr = 0; rr < 4; rr++)
          for (int cc = 0; cc < 4; cc++)
            if (col_n == ~(4'b1 << col_line[cc]) && row_n == ~(4'b1 << row_line[rr]))
              exp_key = hexval(layout[rr][cc]);
        #1;
        checks++;
        if (key !== exp_key) begin
          failures++;
          $display("col_n %b row_n %b: key %h expected %h", col_n, row_n, key, exp_key);
        end
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
