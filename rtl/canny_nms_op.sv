// canny_nms_op: non-maximum suppression and double threshold of the Canny detector.
//
// The window holds {dir, mag} from canny_grad_op. The centre magnitude survives only
// if it is not smaller than both neighbours along its gradient direction:
//   dir 0: left and right, dir 2: above and below,
//   dir 1: upper-left and lower-right, dir 3: upper-right and lower-left.
// A surviving pixel is classed 2 (strong) if mag >= th_hi, 1 (weak) if mag >= th_lo,
// otherwise 0, as is every suppressed pixel. Purely combinational.
// This stage and its encodings are this design's choices (textbook Canny).
module canny_nms_op (
  input  logic [2:0][2:0][12:0] win,
  input  logic [10:0]           th_lo,
  input  logic [10:0]           th_hi,
  output logic [1:0]            pix
);
  logic [10:0] m, n1, n2;
  logic [1:0]  d;

  always_comb begin
    m = win[1][1][10:0];
    d = win[1][1][12:11];
    case (d)
      2'd0:    begin n1 = win[1][0][10:0]; n2 = win[1][2][10:0]; end
      2'd2:    begin n1 = win[0][1][10:0]; n2 = win[2][1][10:0]; end
      2'd1:    begin n1 = win[0][0][10:0]; n2 = win[2][2][10:0]; end
      default: begin n1 = win[0][2][10:0]; n2 = win[2][0][10:0]; end
    endcase
    if (m < n1 || m < n2) pix = 2'd0;
    else if (m >= th_hi)  pix = 2'd2;
    else if (m >= th_lo)  pix = 2'd1;
    else                  pix = 2'd0;
  end
endmodule
