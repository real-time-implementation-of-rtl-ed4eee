// gauss_op: 3x3 Gaussian smoothing for one pixel.
//
// Kernel [1 2 1; 2 4 2; 1 2 1]/16, rounded to nearest: pix = (sum + 8) >> 4. The
// weights are powers of two, so the result is shifts and adds only.
// Purely combinational: the caller registers it.
// Interface: win[r][c] (r=0 top, c=0 left), pix = smoothed centre pixel.
// The document names a Gaussian filter; the kernel and rounding are this design's
// choices (the usual 3x3 binomial kernel).
module gauss_op (
  input  logic [2:0][2:0][7:0] win,
  output logic [7:0]           pix
);
  logic [11:0] sum;

  always_comb begin
    sum = 12'(win[0][0]) + 12'(win[0][2]) + 12'(win[2][0]) + 12'(win[2][2])
        + ((12'(win[0][1]) + 12'(win[1][0]) + 12'(win[1][2]) + 12'(win[2][1])) << 1)
        + (12'(win[1][1]) << 2)
        + 12'd8;
    pix = 8'(sum >> 4);
  end
endmodule
