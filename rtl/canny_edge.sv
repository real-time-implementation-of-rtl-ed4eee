// canny_edge: Canny edge detector for a grey stream of PPC pixels per clock.
//
// Four contextual stages, each a ctx_filter with its own context generator:
//   1. 3x3 Gaussian smoothing,
//   2. Sobel gradient: 11-bit L1 magnitude and a 2-bit direction sector,
//   3. non-maximum suppression along the direction, then double threshold into
//      none / weak / strong,
//   4. single-pass hysteresis: weak pixels next to a strong one are kept.
// Output: one edge bit per pixel with its sideband.
// Timing: one element per clock; latency 4 * (HSIZE + 3) cycles.
// The document names Canny edge detection for this pipeline; the stage split,
// the single-pass hysteresis and the run-time thresholds are this design's choices.
module canny_edge
  import vid_pkg::*;
#(
  parameter int unsigned PPC   = 4,
  parameter int unsigned HSIZE = 1100
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [PPC-1:0][7:0]  y_in,
  input  sb_t                  sb_in,
  input  logic [10:0]          th_lo,
  input  logic [10:0]          th_hi,
  output logic [PPC-1:0]       e_out,
  output sb_t                  sb_out
);
  logic [PPC-1:0][7:0]  g;
  logic [PPC-1:0][12:0] grad;
  logic [PPC-1:0][1:0]  cls;
  sb_t                  sb_g, sb_grad, sb_cls;

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_GAUSS)) u_gauss (
    .clk(clk), .rst(rst), .din(y_in), .sb_in(sb_in), .th_lo(th_lo), .th_hi(th_hi),
    .dout(g), .sb_out(sb_g));

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_CANNY_GRAD)) u_grad (
    .clk(clk), .rst(rst), .din(g), .sb_in(sb_g), .th_lo(th_lo), .th_hi(th_hi),
    .dout(grad), .sb_out(sb_grad));

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_CANNY_NMS)) u_nms (
    .clk(clk), .rst(rst), .din(grad), .sb_in(sb_grad), .th_lo(th_lo), .th_hi(th_hi),
    .dout(cls), .sb_out(sb_cls));

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_CANNY_HYST)) u_hyst (
    .clk(clk), .rst(rst), .din(cls), .sb_in(sb_cls), .th_lo(th_lo), .th_hi(th_hi),
    .dout(e_out), .sb_out(sb_out));
endmodule
