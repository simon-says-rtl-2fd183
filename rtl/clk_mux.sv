// clk_mux: selects the game-speed clock sent to the microcontroller.
//
// speed_clk[2:0] are the slow (2 s), medium (1 s) and fast (0.5 s) square
// waves from the timebase, index 2 the slowest. sel comes from the
// microcontroller: SPEED_2S (3) picks speed_clk[2], SPEED_1S (1) picks
// speed_clk[1], SPEED_HALF (2) picks speed_clk[0], SPEED_NONE (0) gives a
// constant 0. The microcontroller times the pattern playback on the rising
// edges of the selected clock. The select codes follow the original
// design. Purely combinational, so a change of sel can shorten one period.
module clk_mux
  import simon_pkg::*;
(
  input  speed_sel_e sel,
  input  logic [2:0] speed_clk,
  output logic       clk_out
);

  always_comb begin
    unique case (sel)
      SPEED_2S:   clk_out = speed_clk[2];
      SPEED_1S:   clk_out = speed_clk[1];
      SPEED_HALF: clk_out = speed_clk[0];
      default:    clk_out = 1'b0;
    endcase
  end

endmodule
