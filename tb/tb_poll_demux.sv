// tb_poll_demux: drives random scan indices and hold values and checks
// that the column lines are the registered one-cold decode of the index,
// frozen while hold is high, and all high after reset.
module tb_poll_demux;
  logic clk = 1'b0, rst = 1'b1, hold = 1'b1;
  logic [1:0] sel = 2'd0;
  logic [3:0] col_n, expected;
  int checks = 0, failures = 0;

  poll_demux dut (.clk, .rst, .hold, .sel, .col_n);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (col_n !== 4'b1111) failures++;
    @(negedge clk) rst = 1'b0;
    expected = 4'b1111;
    repeat (2000) begin
      @(negedge clk);
      hold = ($urandom_range(0, 3) == 0);
      sel  = 2'($urandom_range(0, 3));
      @(posedge clk);
      if (!hold) begin
        case (sel)
          2'd0: expected = 4'b1110;
          2'd1: expected = 4'b1101;
          2'd2: expected = 4'b1011;
          2'd3: expected = 4'b0111;
        endcase
      end
      #1;
      checks++;
      if (col_n !== expected) begin
        failures++;
        $display("sel %0d hold %b: col_n %b expected %b", sel, hold, col_n, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
