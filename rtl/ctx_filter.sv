// ctx_filter: one 3x3 contextual operation on a stream of PPC pixels per clock.
//
// A context_gen builds, every clock, one 3x3 window for each of the PPC pixels of its
// centre element; PPC copies of the operation selected by OP process these windows
// in parallel and their results are registered together with the centre element's
// sideband, so the output is again a PPC-pixel stream with aligned de/hsync/vsync.
// Input and output pixel widths follow from OP (vid_pkg::op_in_w / op_out_w).
//
// Interface: din/sb_in in, dout/sb_out out; th_lo/th_hi are used by OP_CANNY_NMS only.
// Timing: one element per clock; latency HSIZE + 3 cycles (one line plus two
// elements in the context generator, one output register).
// The structure (context generator feeding PPC parallel operations) follows the
// document; the sideband handling and the output register are this design's choices.
module ctx_filter
  import vid_pkg::*;
#(
  parameter int unsigned PPC   = 4,
  parameter int unsigned HSIZE = 1100,
  parameter op_e         OP    = OP_SOBEL,
  localparam int unsigned IW   = op_in_w(OP),
  localparam int unsigned OW   = op_out_w(OP)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [PPC-1:0][IW-1:0] din,
  input  sb_t                    sb_in,
  input  logic [10:0]            th_lo,
  input  logic [10:0]            th_hi,
  output logic [PPC-1:0][OW-1:0] dout,
  output sb_t                    sb_out
);
  logic [PPC-1:0][2:0][2:0][IW-1:0] win;
  logic [SB_W-1:0]                  sb_c;
  logic [PPC-1:0][OW-1:0]           res;

  context_gen #(.PPC(PPC), .W(IW), .K(3), .HSIZE(HSIZE), .SB(SB_W)) u_ctx (
    .clk    (clk),
    .rst    (rst),
    .din    (din),
    .sb_in  (sb_in),
    .win    (win),
    .sb_out (sb_c)
  );

  for (genvar k = 0; k < PPC; k++) begin : g_op
    if (OP == OP_BOX) begin : g
      box_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_GAUSS) begin : g
      gauss_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_SOBEL) begin : g
      sobel_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_MEDIAN) begin : g
      median_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_ERODE) begin : g
      erode_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_DILATE) begin : g
      dilate_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_BMEDIAN) begin : g
      bmedian_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_CANNY_GRAD) begin : g
      canny_grad_op u_op (.win(win[k]), .pix(res[k]));
    end else if (OP == OP_CANNY_NMS) begin : g
      canny_nms_op u_op (.win(win[k]), .th_lo(th_lo), .th_hi(th_hi), .pix(res[k]));
    end else begin : g
      canny_hyst_op u_op (.win(win[k]), .pix(res[k]));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout   <= '0;
      sb_out <= '0;
    end else begin
      dout   <= res;
      sb_out <= sb_t'(sb_c);
    end
  end
endmodule
