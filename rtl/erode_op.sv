// erode_op: 3x3 morphological erosion of a binary image, for one pixel.
//
// With a full 3x3 structuring element the result is 1 only if all nine window
// pixels are 1 (the minimum of the window). Purely combinational.
// Interface: win[r][c] (r=0 top, c=0 left), pix = eroded centre pixel.
// The operation is the document's; the square structuring element is this design's
// choice.
module erode_op (
  input  logic [2:0][2:0] win,
  output logic            pix
);
  assign pix = &win;
endmodule
