// tb_hold_reg: random data and load pulses; q must take d exactly on the
// edges where load is high and keep its value otherwise; reset clears it.
module tb_hold_reg;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [3:0] d = '0, q, expected;
  int checks = 0, failures = 0, loads = 0;

  hold_reg dut (.clk, .rst, .load, .d, .q);

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
    if (q !== 4'h0) failures++;
    @(negedge clk) rst = 1'b0;
    expected = 4'h0;
    repeat (3000) begin
      @(negedge clk);
      d = 4'($urandom);
      load = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (load) begin expected = d; loads++; end
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("q %h expected %h", q, expected);
      end
    end
    checks++;
    if (loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
