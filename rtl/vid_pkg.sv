// vid_pkg: types and constants shared by the multi-pixel-per-clock video pipeline.
//
// The stream carries PPC pixels per clock (4 for a 3840x2160@60 stream at 148.5 MHz,
// 2 at 297 MHz) together with native-video sideband signals (data enable, horizontal
// and vertical sync), all active high. The default line length is that of the
// CTA-861 timing of 3840x2160@60 (4400 pixels, 594 MHz pixel clock); the pixel width of 8 bits per
// colour channel and the operation codes are this design's own choices.
package vid_pkg;

  localparam int unsigned UHD_H_TOTAL = 4400;  // pixels per line including blanking
  localparam int unsigned SB_W        = 3;     // sideband width

  // Native-video sideband travelling with every multi-pixel element.
  typedef struct packed {
    logic de;
    logic hs;
    logic vs;
  } sb_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // 3x3 contextual operations that ctx_filter can instantiate.
  typedef enum logic [3:0] {
    OP_BOX        = 4'd0,
    OP_GAUSS      = 4'd1,
    OP_SOBEL      = 4'd2,
    OP_MEDIAN     = 4'd3,
    OP_ERODE      = 4'd4,
    OP_DILATE     = 4'd5,
    OP_BMEDIAN    = 4'd6,
    OP_CANNY_GRAD = 4'd7,
    OP_CANNY_NMS  = 4'd8,
    OP_CANNY_HYST = 4'd9
  } op_e;

  // Output selection of the processing top.
  typedef enum logic [3:0] {
    MODE_PASS    = 4'd0,
    MODE_GRAY    = 4'd1,
    MODE_BOX     = 4'd2,
    MODE_GAUSS   = 4'd3,
    MODE_SOBEL   = 4'd4,
    MODE_MEDIAN  = 4'd5,
    MODE_CANNY   = 4'd6,
    MODE_BINARY  = 4'd7,
    MODE_ERODE   = 4'd8,
    MODE_DILATE  = 4'd9,
    MODE_BMEDIAN = 4'd10
  } mode_e;

  // Pixel width a contextual operation reads and writes. Canny gradient stage
  // carries an 11-bit magnitude and a 2-bit direction sector; its NMS stage a
  // 2-bit class (0 none, 1 weak, 2 strong).
  function automatic int unsigned op_in_w(op_e op);
    case (op)
      OP_ERODE, OP_DILATE, OP_BMEDIAN: return 1;
      OP_CANNY_NMS:                    return 13;
      OP_CANNY_HYST:                   return 2;
      default:                         return 8;
    endcase
  endfunction

  function automatic int unsigned op_out_w(op_e op);
    case (op)
      OP_ERODE, OP_DILATE, OP_BMEDIAN, OP_CANNY_HYST: return 1;
      OP_CANNY_GRAD:                                  return 13;
      OP_CANNY_NMS:                                   return 2;
      default:                                        return 8;
    endcase
  endfunction

endpackage
