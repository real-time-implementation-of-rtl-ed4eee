// bmedian_op: 3x3 median of a binary image, for one pixel.
//
// The median of nine bits is their majority: the ones are counted and the result is
// 1 when at least five are set. Purely combinational.
// Interface: win[r][c] (r=0 top, c=0 left), pix = majority of the window.
// The operation is the document's; the counting form is this design's choice.
module bmedian_op (
  input  logic [2:0][2:0] win,
  output logic            pix
);
  logic [3:0] ones;

  always_comb begin
    ones = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        ones += 4'(win[r][c]);
    pix = (ones >= 4'd5);
  end
endmodule
