// seg_display: two-digit multiplexed seven-segment driver.
//
// Both digits of the board share the seven segment lines; each digit's
// common anode is switched by a transistor. A small refresh counter runs
// on the system clock and its bit REFRESH_BIT is brought out as digit_sel,
// with digit_sel_n as its inverse, to drive the two transistors so that
// exactly one digit is on at a time. While digit_sel is 1 the segment
// lines carry the ones digit, while it is 0 the tens digit, so each digit
// shows its own value. With the default REFRESH_BIT = 3 the digits swap
// every 8 clocks (125 kHz period at 2 MHz), far faster than the eye sees.
// seg_n is active low, bit 6 = segment a .. bit 0 = segment g, combinational
// from the selected digit. The scheme, the counter tap and the segment
// patterns follow the original design. Reset is asynchronous, active high.
module seg_display
  import simon_pkg::*;
#(
  parameter int unsigned REFRESH_BIT = 3
) (
  input  logic clk,
  input  logic rst,
  input  bcd_t ones,
  input  bcd_t tens,
  output seg_t seg_n,
  output logic digit_sel,
  output logic digit_sel_n
);

  logic [REFRESH_BIT:0] refresh;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) refresh <= '0;
    else     refresh <= refresh + 1'b1;
  end

  assign digit_sel   = refresh[REFRESH_BIT];
  assign digit_sel_n = ~digit_sel;
  assign seg_n       = hex_to_seg(digit_sel ? ones : tens);

endmodule
