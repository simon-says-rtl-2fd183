// simon_pkg: types and constants shared by the Simon Says FPGA logic.
//
// key_code_t is the 4-bit hex value of a keypad key (0..F). The game uses
// keys 1, 2 and 3 as the three coloured buttons and keys 4, 5 and 6 as the
// speed keys (slow, medium, fast). seg_t is one seven-segment pattern,
// bit 6 = segment a down to bit 0 = segment g, active low (0 lights the
// segment), as the display is driven through common-anode digits.
package simon_pkg;

  typedef logic [3:0] key_code_t;
  typedef logic [3:0] bcd_t;
  typedef logic [6:0] seg_t;   // {a,b,c,d,e,f,g}, active low

  // Game-speed clock select, as written by the microcontroller.
  typedef enum logic [1:0] {
    SPEED_NONE = 2'd0,   // no clock
    SPEED_1S   = 2'd1,   // medium: 1 s period
    SPEED_HALF = 2'd2,   // fast:   0.5 s period
    SPEED_2S   = 2'd3    // slow:   2 s period
  } speed_sel_e;

  localparam key_code_t KEY_RED    = 4'h1;
  localparam key_code_t KEY_YELLOW = 4'h2;
  localparam key_code_t KEY_GREEN  = 4'h3;
  localparam key_code_t KEY_SLOW   = 4'h4;
  localparam key_code_t KEY_MEDIUM = 4'h5;
  localparam key_code_t KEY_FAST   = 4'h6;

  // Hex digit to active-low segment pattern (lower-case b and d).
  function automatic seg_t hex_to_seg(input logic [3:0] v);
    unique case (v)
      4'h0: return 7'b000_0001;
      4'h1: return 7'b100_1111;
      4'h2: return 7'b001_0010;
      4'h3: return 7'b000_0110;
      4'h4: return 7'b100_1100;
      4'h5: return 7'b010_0100;
      4'h6: return 7'b010_0000;
      4'h7: return 7'b000_1111;
      4'h8: return 7'b000_0000;
      4'h9: return 7'b000_1100;
      4'hA: return 7'b000_1000;
      4'hB: return 7'b110_0000;
      4'hC: return 7'b011_0001;
      4'hD: return 7'b100_0010;
      4'hE: return 7'b011_0000;
      default: return 7'b011_1000;  // F
    endcase
  endfunction

endpackage
