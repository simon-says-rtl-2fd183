// tb_led_mux: all select and input combinations; sel = 1 must show the
// pattern, sel = 0 the key-press LEDs.
module tb_led_mux;
  logic       sel;
  logic [2:0] key_led, pattern, led;
  int checks = 0, failures = 0;

  led_mux dut (.sel, .key_led, .pattern, .led);

  initial begin
    for (int i = 0; i < 128; i++) begin
      {sel, key_led, pattern} = 7'(i);
      #1;
      checks++;
      if (led !== (sel ? pattern : key_led)) begin
        failures++;
        $display("sel %b key %b pat %b: led %b", sel, key_led, pattern, led);
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
