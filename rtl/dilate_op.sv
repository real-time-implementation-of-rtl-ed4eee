// dilate_op: 3x3 morphological dilation of a binary image, for one pixel.
//
// With a full 3x3 structuring element the result is 1 if any of the nine window
// pixels is 1 (the maximum of the window). Purely combinational.
// Interface: win[r][c] (r=0 top, c=0 left), pix = dilated centre pixel.
// The operation is the document's; the square structuring element is this design's
// choice.
module dilate_op (
  input  logic [2:0][2:0] win,
  output logic            pix
);
  assign pix = |win;
endmodule
