// binarize: threshold of a grey stream into a binary image, PPC pixels per clock.
//
// Each of the PPC copies outputs 1 when its pixel is strictly greater than thr.
// Output and sideband are registered: latency 1 cycle. The binary image feeds the
// erosion, dilation and binary median filters.
// The document lists binarization among the non-contextual operations replicated per
// pixel; the strict comparison and run-time threshold are this design's choices.
module binarize
  import vid_pkg::*;
#(
  parameter int unsigned PPC = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [PPC-1:0][7:0] y_in,
  input  sb_t                 sb_in,
  input  logic [7:0]          thr,
  output logic [PPC-1:0]      b_out,
  output sb_t                 sb_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      b_out  <= '0;
      sb_out <= '0;
    end else begin
      for (int k = 0; k < PPC; k++)
        b_out[k] <= (y_in[k] > thr);
      sb_out <= sb_in;
    end
  end
endmodule
