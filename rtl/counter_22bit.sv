// counter_22bit: free-running timebase of the Simon Says FPGA.
//
// A 22-bit up-counter clocked by the 2 MHz system clock. Its taps serve
// three purposes:
//   * poll_sel    = count[16:15], steps the keypad column scan (~61 Hz/step)
//   * speed_clk   = count[21:19], square waves with periods of 2^20, 2^21
//                   and 2^22 cycles, i.e. about 0.5 s, 1 s and 2 s at 2 MHz;
//                   speed_clk[0] is the fastest, speed_clk[2] the slowest
//   * db_tick     = one-cycle pulse in the cycle in which count[13] rises
//                   (every 2^14 cycles, ~8 ms), the debouncer's sample instant
// The tap positions and width follow the original design. The original
// clocked the debouncer directly with count[13]; here that rising edge is
// turned into a clock-enable pulse so the whole design runs on one clock.
// db_tick is registered and is high exactly in the cycle in which
// count[DB_BIT] is first 1. Reset is asynchronous, active high, to zero.
module counter_22bit #(
  parameter int unsigned WIDTH     = 22,
  parameter int unsigned POLL_LSB  = 15,
  parameter int unsigned DB_BIT    = 13,
  parameter int unsigned SPEED_LSB = 19
) (
  input  logic       clk,
  input  logic       rst,
  output logic [1:0] poll_sel,
  output logic [2:0] speed_clk,
  output logic       db_tick
);

  logic [WIDTH-1:0] count;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count   <= '0;
      db_tick <= 1'b0;
    end else begin
      count   <= count + 1'b1;
      // count[DB_BIT:0] == 0111..1 now means bit DB_BIT rises on this edge
      db_tick <= (count[DB_BIT:0] == {1'b0, {DB_BIT{1'b1}}});
    end
  end

  assign poll_sel  = count[POLL_LSB+1:POLL_LSB];
  assign speed_clk = count[SPEED_LSB+2:SPEED_LSB];

endmodule
