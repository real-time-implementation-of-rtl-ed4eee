// sobel_op: 3x3 Sobel edge magnitude for one pixel.
//
// Gx = right column - left column and Gy = bottom row - top row, each with weights
// 1,2,1; the magnitude is approximated by |Gx| + |Gy| and saturated to 255.
// Purely combinational: the caller registers it.
// Interface: win[r][c] (r=0 top, c=0 left), pix = edge strength.
// The document names the Sobel filter; the L1 magnitude and saturation are this
// design's choices.
module sobel_op (
  input  logic [2:0][2:0][7:0] win,
  output logic [7:0]           pix
);
  logic signed [10:0] gx, gy;
  logic        [10:0] ax, ay;
  logic        [11:0] mag;

  always_comb begin
    gx = (11'(win[0][2]) + (11'(win[1][2]) << 1) + 11'(win[2][2]))
       - (11'(win[0][0]) + (11'(win[1][0]) << 1) + 11'(win[2][0]));
    gy = (11'(win[2][0]) + (11'(win[2][1]) << 1) + 11'(win[2][2]))
       - (11'(win[0][0]) + (11'(win[0][1]) << 1) + 11'(win[0][2]));
    ax  = gx[10] ? 11'(-gx) : 11'(gx);
    ay  = gy[10] ? 11'(-gy) : 11'(gy);
    mag = 12'(ax) + 12'(ay);
    pix = (mag > 12'd255) ? 8'd255 : mag[7:0];
  end
endmodule
