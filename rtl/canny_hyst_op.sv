// canny_hyst_op: single-pass hysteresis of the Canny detector, for one pixel.
//
// A strong pixel (class 2) is an edge; a weak pixel (class 1) is an edge only if one
// of its eight neighbours is strong. This is the one-pass, 3x3 approximation of
// edge tracking that fits a streaming pipeline without frame buffers.
// Purely combinational. Interface: win of 2-bit classes, pix = edge bit.
// The approximation is this design's choice; the document only names Canny.
module canny_hyst_op (
  input  logic [2:0][2:0][1:0] win,
  output logic                 pix
);
  logic strong_nb;

  always_comb begin
    strong_nb = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && win[r][c] == 2'd2) strong_nb = 1'b1;
    pix = (win[1][1] == 2'd2) || (win[1][1] == 2'd1 && strong_nb);
  end
endmodule
