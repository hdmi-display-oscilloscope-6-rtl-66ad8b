// scope_pkg: types, constants and lookup functions shared by the oscilloscope RTL.
//
// Frame-buffer word layout (one 16-bit DDR2 location per pixel, MSB first):
//   [15:12] R  [11:8] G  [7:4] B  [3] HSYNC  [2] VSYNC  [1] MARKER  [0] unused
// MARKER = 1 marks a pixel written for the frame being shown; it is ignored on words
// that carry an active HSYNC or VSYNC. The field order follows the frame-buffer memory
// map of the design; placing R in the top bits is this design's choice.
//
// Video timing defaults are the common 1366x768 at 60 Hz mode with an 85.5 MHz pixel
// clock (1792 x 798 total, positive syncs); the front-panel tables (1-2-5 full-scale
// ranges from 100 mV to 100 V, 1-2-5 decimation steps) are this design's choices.
package scope_pkg;

  typedef struct packed {
    logic [3:0] r;
    logic [3:0] g;
    logic [3:0] b;
    logic       hsync;
    logic       vsync;
    logic       marker;
    logic       unused;
  } fb_word_t;

  // Pixel colours used by the pixel calculator
  localparam logic [11:0] COL_GRID = 12'h444;
  localparam logic [11:0] COL_TEXT = 12'hFFF;
  localparam logic [11:0] COL_CH0  = 12'hFF0;
  localparam logic [11:0] COL_CH1  = 12'h0FF;

  // Default 1366x768 video timing
  localparam int H_ACTIVE_D = 1366;
  localparam int H_FP_D     = 70;
  localparam int H_SYNC_D   = 143;
  localparam int H_BP_D     = 213;
  localparam int V_ACTIVE_D = 768;
  localparam int V_FP_D     = 3;
  localparam int V_SYNC_D   = 3;
  localparam int V_BP_D     = 24;

  // Number of full-scale ranges and timebase steps selectable from the front panel
  localparam int N_VRANGE = 10;
  localparam int N_TBASE  = 7;

  // Full-scale range index 0..9 = 0.1, 0.2, 0.5, 1, 2, 5, 10, 20, 50, 100 V.
  // Ranges of 5 V and up switch in the 1:50 attenuator.
  function automatic logic vrange_atten(input logic [3:0] idx);
    return idx >= 4'd5;
  endfunction

  // Span that the ADC reference must cover, in units of 0.1 V, after the
  // probe (/10), attenuator (1 or /50) and preamplifier (x10).
  function automatic int vrange_span_dv(input logic [3:0] idx);
    case (idx)
      4'd0: return 1;   // 0.1 V
      4'd1: return 2;
      4'd2: return 5;
      4'd3: return 10;
      4'd4: return 20;  // 2 V
      4'd5: return 1;   // 5 V / 50
      4'd6: return 2;   // 10 V / 50
      4'd7: return 4;   // 20 V / 50
      4'd8: return 10;  // 50 V / 50
      default: return 20; // 100 V / 50
    endcase
  endfunction

  // Reference DAC code: the DAC full scale (255) corresponds to a 2.0 V span.
  function automatic logic [7:0] vrange_dac(input logic [3:0] idx);
    int code;
    code = (vrange_span_dv(idx) * 255 + 10) / 20;
    return 8'(code);
  endfunction

  // Timebase index 0..6: samples skipped per screen column 1, 2, 5, 10, 20, 50, 100.
  function automatic logic [6:0] tbase_decim(input logic [2:0] idx);
    case (idx)
      3'd0: return 7'd1;
      3'd1: return 7'd2;
      3'd2: return 7'd5;
      3'd3: return 7'd10;
      3'd4: return 7'd20;
      3'd5: return 7'd50;
      default: return 7'd100;
    endcase
  endfunction

  // 3x5 font for hex digits; bit (row*3 + col), row 0 at the top, col 0 at the left.
  function automatic logic [14:0] hex_font(input logic [3:0] d);
    case (d)
      4'h0: return 15'b111_101_101_101_111;
      4'h1: return 15'b010_010_010_011_010;
      4'h2: return 15'b111_001_111_100_111;
      4'h3: return 15'b111_100_110_100_111;
      4'h4: return 15'b100_100_111_101_101;
      4'h5: return 15'b111_100_111_001_111;
      4'h6: return 15'b111_101_111_001_111;
      4'h7: return 15'b100_100_100_100_111;
      4'h8: return 15'b111_101_111_101_111;
      4'h9: return 15'b111_100_111_101_111;
      4'hA: return 15'b101_101_111_101_111;
      4'hB: return 15'b011_101_011_101_011;
      4'hC: return 15'b111_001_001_001_111;
      4'hD: return 15'b011_101_101_101_011;
      4'hE: return 15'b111_001_111_001_111;
      default: return 15'b001_001_111_001_111;
    endcase
  endfunction

endpackage
