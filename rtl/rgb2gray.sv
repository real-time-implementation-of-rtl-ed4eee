// rgb2gray: RGB888 to 8-bit luminance for PPC pixels per clock.
//
// Non-contextual operations on a multi-pixel stream are simply replicated PPC times.
// Each copy computes Y = (77 R + 150 G + 29 B + 128) >> 8, the ITU-R BT.601 weights
// (0.299, 0.587, 0.114) in 8-bit fixed point, rounded; the weights sum to 256 so the
// result never exceeds 255. Output and sideband are registered: latency 1 cycle.
// The conversion is the document's; the weights and rounding are this design's
// choices.
module rgb2gray
  import vid_pkg::*;
#(
  parameter int unsigned PPC = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  rgb_t [PPC-1:0]      rgb_in,
  input  sb_t                 sb_in,
  output logic [PPC-1:0][7:0] y_out,
  output sb_t                 sb_out
);
  logic [PPC-1:0][7:0] y;

  always_comb begin
    for (int k = 0; k < PPC; k++) begin
      automatic logic [15:0] acc = 16'd77 * 16'(rgb_in[k].r)
                                 + 16'd150 * 16'(rgb_in[k].g)
                                 + 16'd29 * 16'(rgb_in[k].b)
                                 + 16'd128;
      y[k] = 8'(acc >> 8);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_out  <= '0;
      sb_out <= '0;
    end else begin
      y_out  <= y;
      sb_out <= sb_in;
    end
  end
endmodule
