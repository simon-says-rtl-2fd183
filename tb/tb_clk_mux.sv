// tb_clk_mux: all select codes and clock levels. Select 3 must pass the
// slowest clock (index 2), 1 the middle one, 2 the fastest (index 0),
// 0 a constant low.
module tb_clk_mux;
  import simon_pkg::*;
  speed_sel_e sel;
  logic [2:0] speed_clk;
  logic       clk_out, expected;
  int checks = 0, failures = 0;

  clk_mux dut (.sel, .speed_clk, .clk_out);

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < 8; c++) begin
        sel = speed_sel_e'(s);
        speed_clk = 3'(c);
        case (s)
          3: expected = speed_clk[2];
          1: expected = speed_clk[1];
          2: expected = speed_clk[0];
          default: expected = 1'b0;
        endcase
        #1;
        checks++;
        if (clk_out !== expected) begin
          failures++;
          $display("sel %0d clocks %b: out %b", s, speed_clk, clk_out);
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
