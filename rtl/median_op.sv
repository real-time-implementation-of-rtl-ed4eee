// median_op: 3x3 median for one grey pixel.
//
// Each column is sorted (three compare-exchanges); the median of the nine values is
// then the median of {largest of the column minima, median of the column medians,
// smallest of the column maxima}. This needs 19 comparisons instead of a full sort.
// Purely combinational: the caller registers it.
// Interface: win[r][c] (r=0 top, c=0 left), pix = median of the window.
// The document names a median filter; the comparator network is this design's choice.
module median_op (
  input  logic [2:0][2:0][7:0] win,
  output logic [7:0]           pix
);
  function automatic logic [7:0] max2(logic [7:0] a, logic [7:0] b);
    return (a > b) ? a : b;
  endfunction
  function automatic logic [7:0] min2(logic [7:0] a, logic [7:0] b);
    return (a < b) ? a : b;
  endfunction
  function automatic logic [7:0] med3(logic [7:0] a, logic [7:0] b, logic [7:0] c);
    return max2(min2(a, b), min2(max2(a, b), c));
  endfunction

  logic [2:0][7:0] lo, mid, hi;   // per column

  always_comb begin
    for (int c = 0; c < 3; c++) begin
      lo[c]  = min2(min2(win[0][c], win[1][c]), win[2][c]);
      hi[c]  = max2(max2(win[0][c], win[1][c]), win[2][c]);
      mid[c] = med3(win[0][c], win[1][c], win[2][c]);
    end
    pix = med3(max2(max2(lo[0], lo[1]), lo[2]),
               med3(mid[0], mid[1], mid[2]),
               min2(min2(hi[0], hi[1]), hi[2]));
  end
endmodule
