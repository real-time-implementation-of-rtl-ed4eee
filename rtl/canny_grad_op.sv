// canny_grad_op: gradient stage of the Canny edge detector, for one pixel.
//
// Computes the Sobel gradients Gx (right minus left) and Gy (bottom minus top), the
// L1 magnitude |Gx|+|Gy| (11 bits, at most 2040) and the gradient direction
// quantised to four sectors:
//   0: near horizontal gradient  |Gy|*256 <= |Gx|*106   (|Gy|/|Gx| <= tan 22.5)
//   2: near vertical gradient    |Gy|*256 >= |Gx|*618   (|Gy|/|Gx| >= tan 67.5)
//   1: diagonal, Gx and Gy of the same sign (down-right / up-left)
//   3: diagonal, opposite signs
// Output: {dir[1:0], mag[10:0]}. Purely combinational.
// The document names Canny edge detection only; this stage and its encodings are
// this design's choices, following the textbook algorithm.
module canny_grad_op (
  input  logic [2:0][2:0][7:0] win,
  output logic [12:0]          pix
);
  logic signed [10:0] gx, gy;
  logic        [10:0] ax, ay;
  logic        [10:0] mag;
  logic        [1:0]  dir;
  logic        [19:0] ay256, ax106, ax618;

  always_comb begin
    gx = (11'(win[0][2]) + (11'(win[1][2]) << 1) + 11'(win[2][2]))
       - (11'(win[0][0]) + (11'(win[1][0]) << 1) + 11'(win[2][0]));
    gy = (11'(win[2][0]) + (11'(win[2][1]) << 1) + 11'(win[2][2]))
       - (11'(win[0][0]) + (11'(win[0][1]) << 1) + 11'(win[0][2]));
    ax    = gx[10] ? 11'(-gx) : 11'(gx);
    ay    = gy[10] ? 11'(-gy) : 11'(gy);
    mag   = ax + ay;
    ay256 = 20'(ay) << 8;
    ax106 = 20'(ax) * 20'd106;
    ax618 = 20'(ax) * 20'd618;
    if (ay256 <= ax106)          dir = 2'd0;
    else if (ay256 >= ax618)     dir = 2'd2;
    else if (gx[10] == gy[10])   dir = 2'd1;
    else                         dir = 2'd3;
    pix = {dir, mag};
  end
endmodule
