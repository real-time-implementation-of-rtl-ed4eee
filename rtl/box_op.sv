// box_op: 3x3 box filter (simple averaging) for one pixel.
//
// The nine window pixels are summed (12 bits) and the sum is divided by 9 by
// multiplying with round(2^16/9) = 7282 and keeping bits [27:16]; for every sum up
// to 9*255 this equals floor(sum/9). Purely combinational: the caller registers it.
// Interface: win[r][c] (r=0 top, c=0 left), pix = average of the window.
// The operation is the document's; the divide-by-multiply and truncation are this
// design's choices.
module box_op (
  input  logic [2:0][2:0][7:0] win,
  output logic [7:0]           pix
);
  logic [11:0] sum;
  logic [27:0] prod;

  always_comb begin
    sum = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        sum += 12'(win[r][c]);
    prod = 28'(sum) * 28'd7282;
    pix  = 8'(prod >> 16);  // at most 255 for sums up to 9*255
  end
endmodule
