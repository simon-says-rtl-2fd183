// tb_rand_counter: after reset the value must run 0, 1, 2, 0, ... one
// step per clock, never showing 3; a reset in the middle restarts it at 0.
module tb_rand_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] value;
  int checks = 0, failures = 0, expected;

  rand_counter dut (.clk, .rst, .value);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    @(negedge clk) rst = 1'b0;
    expected = 0;
    for (int i = 0; i < 1000; i++) begin
      if (i == 500) begin
        @(negedge clk) rst = 1'b1;
        @(negedge clk) rst = 1'b0;
        expected = 0;
      end
      checks++;
      if (value !== 2'(expected)) begin
        failures++;
        $display("cycle %0d: value %0d expected %0d", i, value, expected);
      end
      @(negedge clk);
      expected = (expected + 1) % 3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
