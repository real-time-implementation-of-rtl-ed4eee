// video_proc_top: contextual and non-contextual processing of a 4K native-video
// stream carried as PPC pixels per clock.
//
// It sits between an HDMI receiver and transmitter (which are not part of this RTL)
// and takes their native-video signals: PPC RGB888 pixels per clock with data
// enable, hsync and vsync. 3840x2160@60 has a 594 MHz pixel rate, too fast for FPGA
// fabric, so the stream is processed 4 (or 2) pixels at a time at 148.5 (297) MHz:
// every non-contextual operation is replicated PPC times and every 3x3 contextual
// operation uses a context generator that hands PPC overlapping windows to PPC
// copies of the operation.
//
// Datapath: rgb2gray -> { box, Gaussian, Sobel, median, Canny } and
// rgb2gray -> binarize -> { erosion, dilation, binary median }. All paths run at
// once; each carries its own copy of the sideband, so whatever path mode selects
// leaves with correctly aligned syncs. Grey and binary results are sent as R=G=B
// (binary 1 as 255). MODE_PASS sends the input unchanged.
//
// Timing: one element per clock in and out, no back-pressure. Latency from input to
// output is 2 cycles (pass), 3 (grey), 4 (binary), HSIZE+6 for the grey 3x3
// filters, HSIZE+7 for the binary ones and 4*(HSIZE+3)+3 for Canny, with
// HSIZE = H_TOTAL/PPC elements per line. A change of mode takes effect on the next
// clock, so switching mid-frame mixes paths in that frame.
// The set of operations and the multi-pixel scheme follow the document; the
// parallel paths with a run-time selector, the thresholds as ports and all widths
// and encodings are this design's choices.
module video_proc_top
  import vid_pkg::*;
#(
  parameter int unsigned PPC     = 4,
  parameter int unsigned H_TOTAL = UHD_H_TOTAL
) (
  input  logic           clk,
  input  logic           rst,
  input  rgb_t [PPC-1:0] in_pix,
  input  sb_t            in_sb,
  input  mode_e          mode,
  input  logic [7:0]     bin_thr,
  input  logic [10:0]    canny_lo,
  input  logic [10:0]    canny_hi,
  output rgb_t [PPC-1:0] out_pix,
  output sb_t            out_sb
);
  localparam int unsigned HSIZE = H_TOTAL / PPC;

  // Input register (the pass-through path starts here).
  rgb_t [PPC-1:0] in_pix_q;
  sb_t            in_sb_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pix_q <= '0;
      in_sb_q  <= '0;
    end else begin
      in_pix_q <= in_pix;
      in_sb_q  <= in_sb;
    end
  end

  // Non-contextual stages.
  logic [PPC-1:0][7:0] y;
  sb_t                 sb_y;
  logic [PPC-1:0]      bin;
  sb_t                 sb_bin;

  rgb2gray #(.PPC(PPC)) u_gray (
    .clk(clk), .rst(rst), .rgb_in(in_pix_q), .sb_in(in_sb_q), .y_out(y), .sb_out(sb_y));

  binarize #(.PPC(PPC)) u_bin (
    .clk(clk), .rst(rst), .y_in(y), .sb_in(sb_y), .thr(bin_thr), .b_out(bin), .sb_out(sb_bin));

  // Contextual filters on the grey image.
  logic [PPC-1:0][7:0] y_box, y_gauss, y_sobel, y_median;
  sb_t                 sb_box, sb_gauss, sb_sobel, sb_median;

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_BOX)) u_box (
    .clk(clk), .rst(rst), .din(y), .sb_in(sb_y), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(y_box), .sb_out(sb_box));
  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_GAUSS)) u_gauss (
    .clk(clk), .rst(rst), .din(y), .sb_in(sb_y), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(y_gauss), .sb_out(sb_gauss));
  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_SOBEL)) u_sobel (
    .clk(clk), .rst(rst), .din(y), .sb_in(sb_y), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(y_sobel), .sb_out(sb_sobel));
  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_MEDIAN)) u_median (
    .clk(clk), .rst(rst), .din(y), .sb_in(sb_y), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(y_median), .sb_out(sb_median));

  logic [PPC-1:0] e_canny;
  sb_t            sb_canny;

  canny_edge #(.PPC(PPC), .HSIZE(HSIZE)) u_canny (
    .clk(clk), .rst(rst), .y_in(y), .sb_in(sb_y), .th_lo(canny_lo), .th_hi(canny_hi),
    .e_out(e_canny), .sb_out(sb_canny));

  // Contextual filters on the binary image.
  logic [PPC-1:0] b_erode, b_dilate, b_median;
  sb_t            sb_erode, sb_dilate, sb_bmedian;

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_ERODE)) u_erode (
    .clk(clk), .rst(rst), .din(bin), .sb_in(sb_bin), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(b_erode), .sb_out(sb_erode));
  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_DILATE)) u_dilate (
    .clk(clk), .rst(rst), .din(bin), .sb_in(sb_bin), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(b_dilate), .sb_out(sb_dilate));
  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP_BMEDIAN)) u_bmedian (
    .clk(clk), .rst(rst), .din(bin), .sb_in(sb_bin), .th_lo(canny_lo), .th_hi(canny_hi),
    .dout(b_median), .sb_out(sb_bmedian));

  // Output selector.
  function automatic rgb_t grey(logic [7:0] v);
    return '{r: v, g: v, b: v};
  endfunction

  rgb_t [PPC-1:0] sel_pix;
  sb_t            sel_sb;

  always_comb begin
    sel_pix = in_pix_q;
    sel_sb  = in_sb_q;
    for (int k = 0; k < PPC; k++) begin
      case (mode)
        MODE_GRAY:    sel_pix[k] = grey(y[k]);
        MODE_BOX:     sel_pix[k] = grey(y_box[k]);
        MODE_GAUSS:   sel_pix[k] = grey(y_gauss[k]);
        MODE_SOBEL:   sel_pix[k] = grey(y_sobel[k]);
        MODE_MEDIAN:  sel_pix[k] = grey(y_median[k]);
        MODE_CANNY:   sel_pix[k] = grey({8{e_canny[k]}});
        MODE_BINARY:  sel_pix[k] = grey({8{bin[k]}});
        MODE_ERODE:   sel_pix[k] = grey({8{b_erode[k]}});
        MODE_DILATE:  sel_pix[k] = grey({8{b_dilate[k]}});
        MODE_BMEDIAN: sel_pix[k] = grey({8{b_median[k]}});
        default:      sel_pix[k] = in_pix_q[k];
      endcase
    end
    case (mode)
      MODE_GRAY:    sel_sb = sb_y;
      MODE_BOX:     sel_sb = sb_box;
      MODE_GAUSS:   sel_sb = sb_gauss;
      MODE_SOBEL:   sel_sb = sb_sobel;
      MODE_MEDIAN:  sel_sb = sb_median;
      MODE_CANNY:   sel_sb = sb_canny;
      MODE_BINARY:  sel_sb = sb_bin;
      MODE_ERODE:   sel_sb = sb_erode;
      MODE_DILATE:  sel_sb = sb_dilate;
      MODE_BMEDIAN: sel_sb = sb_bmedian;
      default:      sel_sb = in_sb_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_pix <= '0;
      out_sb  <= '0;
    end else begin
      out_pix <= sel_pix;
      out_sb  <= sel_sb;
    end
  end
endmodule
