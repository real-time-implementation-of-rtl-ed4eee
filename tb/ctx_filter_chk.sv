// ctx_filter_chk: drives one ctx_filter configuration with a random stream and
// checks every output pixel and the sideband.
//
// The input stream is stored as a flat pixel sequence (pixel p of element t is
// pixel t*PPC+p; pixels before the first element after reset count as zero). During
// cycle t the output must be the operation applied to the window around centre
// pixels (t-LAT)*PPC + k, with LAT = HSIZE + 3, and the sideband must be that of
// element t-LAT. The window of centre pixel i holds pixel i + (r-1)*HSIZE*PPC + (c-1)
// at [r][c]. For the Canny gradient stage the input is smooth (a slow ramp plus
// noise) so all four direction sectors occur; per-direction counts are returned.
module ctx_filter_chk
  import vid_pkg::*;
  import img_ref_pkg::*;
#(
  parameter int unsigned PPC    = 2,
  parameter int unsigned HSIZE  = 9,
  parameter op_e         OP     = OP_BOX,
  parameter int unsigned CYCLES = 400
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   nonzero,
  output logic done
);
  localparam int unsigned IW  = op_in_w(OP);
  localparam int unsigned OW  = op_out_w(OP);
  localparam int          LAT = HSIZE + 3;
  localparam int          TH_LO = 60;
  localparam int          TH_HI = 200;

  logic                   rst;
  logic [PPC-1:0][IW-1:0] din;
  sb_t                    sb_in;
  logic [PPC-1:0][OW-1:0] dout;
  sb_t                    sb_out;

  int  s  [CYCLES * PPC];
  sb_t sh [CYCLES];

  ctx_filter #(.PPC(PPC), .HSIZE(HSIZE), .OP(OP)) dut (
    .clk(clk), .rst(rst), .din(din), .sb_in(sb_in), .th_lo(11'(TH_LO)), .th_hi(11'(TH_HI)),
    .dout(dout), .sb_out(sb_out));

  function automatic int px(int i);
    return (i < 0) ? 0 : s[i];
  endfunction

  function automatic int expected(int i);
    win_t w;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w[r][c] = px(i + (r - 1) * int'(HSIZE * PPC) + (c - 1));
    case (OP)
      OP_BOX:        return ref_box(w);
      OP_GAUSS:      return ref_gauss(w);
      OP_SOBEL:      return ref_sobel(w);
      OP_MEDIAN:     return ref_median(w);
      OP_ERODE:      return ref_erode(w);
      OP_DILATE:     return ref_dilate(w);
      OP_BMEDIAN:    return ref_bmedian(w);
      OP_CANNY_GRAD: return ref_cgrad(w);
      OP_CANNY_NMS:  return ref_nms(w, TH_LO, TH_HI);
      default:       return ref_hyst(w);
    endcase
  endfunction

  function automatic int stimulus(int i);
    int v;
    case (OP)
      OP_ERODE, OP_DILATE, OP_BMEDIAN: v = ($urandom_range(0, 99) < 70) ? 1 : 0;
      OP_CANNY_NMS: v = int'($urandom_range(0, 3)) * 2048 + int'($urandom_range(0, 300));
      OP_CANNY_HYST: v = int'($urandom_range(0, 3));
      OP_CANNY_GRAD: begin
        // smooth texture: blocks of random level with soft noise
        v = ((i / 3) % 7) * 30 + int'($urandom_range(0, 8));
      end
      default: v = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 255))
                                                : 100 + int'($urandom_range(0, 40));
    endcase
    return v;
  endfunction

  initial begin
    checks   = 0;
    failures = 0;
    nonzero  = 0;
    done     = 1'b0;
    rst      = 1'b1;
    din      = '0;
    sb_in    = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      for (int p = 0; p < int'(PPC); p++) begin
        s[t * PPC + p] = stimulus(t * PPC + p);
        din[p] <= IW'(s[t * PPC + p]);
      end
      sh[t] = sb_t'($urandom);
      sb_in <= sh[t];
      @(negedge clk);
      begin
        int m;
        m = t - LAT;
        checks++;
        if (sb_out !== ((m < 0) ? sb_t'('0) : sh[m])) begin
          failures++;
          if (failures < 10) $display("OP=%s PPC=%0d cycle %0d: sideband mismatch", OP.name(), PPC, t);
        end
        for (int k = 0; k < int'(PPC); k++) begin
          int e;
          e = expected(m * int'(PPC) + k);
          checks++;
          if (int'(dout[k]) != 0) nonzero++;
          if (int'(dout[k]) != e) begin
            failures++;
            if (failures < 10)
              $display("OP=%s PPC=%0d cycle %0d pixel %0d: got %0d expected %0d", OP.name(), PPC, t, k, dout[k], e);
          end
        end
      end
      @(posedge clk);
    end
    done = 1'b1;
  end
endmodule
