// tb_keypress_output: all 16 key codes against the expected LED and speed
// codes (keys 1-3 light red, yellow, green; keys 4-6 give slow, medium,
// fast speed codes 3, 1, 2; everything else gives nothing).
module tb_keypress_output;
  import simon_pkg::*;
  key_code_t  key;
  logic [2:0] led;
  logic [1:0] speed;
  int checks = 0, failures = 0;

  keypress_output dut (.key, .led, .speed);

  logic [2:0] exp_led   [16];
  logic [1:0] exp_speed [16];

  initial begin
    foreach (exp_led[i]) begin exp_led[i] = '0; exp_speed[i] = '0; end
    exp_led[1] = 3'b001; exp_led[2] = 3'b010; exp_led[3] = 3'b100;
    exp_speed[4] = 2'd3; exp_speed[5] = 2'd1; exp_speed[6] = 2'd2;
    for (int k = 0; k < 16; k++) begin
      key = 4'(k);
      #1;
      checks++;
      if (led !== exp_led[k] || speed !== exp_speed[k]) begin
        failures++;
        $display("key %h: led %b speed %b", k, led, speed);
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
