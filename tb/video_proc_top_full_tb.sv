// video_proc_top_full_tb: one complete 3840x2160@60 frame through the processing
// top at its default parameters (4 pixels per clock, 4400 pixels per line).
//
// The stream follows the CTA-861 timing of 3840x2160@60: 3840 active pixels and
// 176/88/296 pixels of front porch, hsync and back porch; 2160 active lines and
// 8/10/72 lines of front porch, vsync and back porch; syncs active high. The scene
// is a colour gradient with rectangles and noise. The top runs in Sobel mode (RGB to
// grey followed by the Sobel filter). Every output element of the frame, blanking included, is compared with a
// Sobel magnitude computed here from the grey stream, at the Sobel path latency of
// HSIZE+6 = 1106 clocks, and the sideband is compared too. The test also checks the
// rate: exactly one element per clock, 1100 * 2250 clocks per frame, and counts
// active pixels, which must be 3840 * 2160.
module video_proc_top_full_tb;
  import vid_pkg::*;
  import img_ref_pkg::*;

  localparam int PPC    = 4;
  localparam int H_TOT  = 4400;
  localparam int H_ACT  = 3840;
  localparam int H_FP   = 176;
  localparam int H_SY   = 88;
  localparam int V_TOT  = 2250;
  localparam int V_ACT  = 2160;
  localparam int V_FP   = 8;
  localparam int V_SY   = 10;
  localparam int HSIZE  = H_TOT / PPC;
  localparam int FRAME  = HSIZE * V_TOT;
  localparam int LAT    = HSIZE + 6;
  localparam int CYCLES = FRAME + LAT + 2;
  localparam int NPIX   = CYCLES * PPC;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic           rst;
  rgb_t [PPC-1:0] in_pix;
  sb_t            in_sb;
  mode_e          mode;
  rgb_t [PPC-1:0] out_pix;
  sb_t            out_sb;

  video_proc_top dut (
    .clk(clk), .rst(rst), .in_pix(in_pix), .in_sb(in_sb), .mode(mode),
    .bin_thr(8'd100), .canny_lo(11'd100), .canny_hi(11'd300),
    .out_pix(out_pix), .out_sb(out_sb));

  logic [7:0] g [];      // grey value of every input pixel
  logic [2:0] sbh [];    // sideband of every input element
  longint     n_active_out = 0;
  longint     n_sat = 0;
  longint     n_edge = 0;

  function automatic int gpx(int i);
    return (i < 0 || i >= NPIX) ? 0 : int'(g[i]);
  endfunction

  function automatic int sobel_at(int i);
    win_t w;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w[r][c] = gpx(i + (r - 1) * H_TOT + (c - 1));
    return ref_sobel(w);
  endfunction

  function automatic rgb_t scene(int x, int y);
    rgb_t p;
    int n;
    n = int'($urandom_range(0, 7));
    p.r = 8'((x / 16) + n);
    p.g = 8'((y / 9) + n);
    p.b = 8'(100 + n);
    if ((x / 256) % 2 == 1 && (y / 144) % 2 == 0) p = '{r: 8'(230 - n), g: 8'(220 - n), b: 8'(210)};
    return p;
  endfunction

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g   = new[NPIX];
    sbh = new[CYCLES];
    rst    = 1'b1;
    in_pix = '0;
    in_sb  = '0;
    mode   = MODE_SOBEL;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      int line, col0;
      sb_t s;
      line = (t / HSIZE) % V_TOT;
      col0 = (t % HSIZE) * PPC;
      s.de = (col0 < H_ACT) && (line < V_ACT);
      s.hs = (col0 >= H_ACT + H_FP) && (col0 < H_ACT + H_FP + H_SY);
      s.vs = (line >= V_ACT + V_FP) && (line < V_ACT + V_FP + V_SY);
      sbh[t] = s;
      for (int p = 0; p < PPC; p++) begin
        rgb_t px;
        px = s.de ? scene(col0 + p, line) : '0;
        in_pix[p] <= px;
        g[t * PPC + p] = 8'(ref_gray(int'(px.r), int'(px.g), int'(px.b)));
      end
      in_sb <= s;
      @(negedge clk);
      begin
        int m;
        sb_t esb;
        m   = t - LAT;
        esb = (m < 0) ? sb_t'('0) : sb_t'(sbh[m]);
        checks++;
        if (out_sb !== esb) begin
          failures++;
          if (failures < 10) $display("cycle %0d: sideband %b expected %b", t, out_sb, esb);
        end
        if (esb.de && m < FRAME) n_active_out++;
        for (int k = 0; k < PPC; k++) begin
          int e;
          e = sobel_at(m * PPC + k);
          checks++;
          if (esb.de && e == 255) n_sat++;
          if (esb.de && e > 40) n_edge++;
          if (out_pix[k] !== rgb_t'({8'(e), 8'(e), 8'(e)})) begin
            failures++;
            if (failures < 10) $display("cycle %0d pixel %0d: %h expected %0d", t, k, out_pix[k], e);
          end
        end
      end
      @(posedge clk);
    end
    $display("active output elements %0d (pixels %0d), edge pixels %0d, saturated %0d",
             n_active_out, n_active_out * PPC, n_edge, n_sat);
    checks++;
    if (n_active_out * PPC != longint'(H_ACT) * V_ACT) begin
      failures++;
      $display("expected %0d active pixels", H_ACT * V_ACT);
    end
    checks++;
    if (n_edge == 0) begin failures++; $display("no edges in the frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
