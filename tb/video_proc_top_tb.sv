// video_proc_top_tb: end-to-end test of the processing top on a reduced raster.
//
// A 4 pixel/clock stream with native-video timing (48 pixels per line of which 32
// active, 16 lines of which 10 active) carries a colour scene: a bright square, a
// dark bar, a colour gradient and noise. The output mode is changed at the start of
// every frame so all eleven modes are seen, and once in the middle of a frame. For
// every clock the testbench predicts the output from the mode of the previous clock
// and the latency of that path (2, 3, 4, HSIZE+6, HSIZE+7 or 4*(HSIZE+3)+3 cycles),
// with all reference images computed here on the flat pixel stream, and compares all
// pixels and the sideband. It counts, and requires at least once: each mode on
// active video, every contextual filter changing a pixel, Sobel saturation,
// Canny keeping a weak edge through hysteresis, both binary values, and a
// mid-frame mode switch.
module video_proc_top_tb;
  import vid_pkg::*;
  import img_ref_pkg::*;

  localparam int PPC    = 4;
  localparam int H_TOT  = 48;
  localparam int H_ACT  = 32;
  localparam int V_TOT  = 16;
  localparam int V_ACT  = 10;
  localparam int HSIZE  = H_TOT / PPC;
  localparam int FRAME  = HSIZE * V_TOT;
  localparam int FRAMES = 13;
  localparam int CYCLES = FRAME * FRAMES;
  localparam int NPIX   = CYCLES * PPC;
  localparam int OFF    = 6 * (H_TOT + 2);
  localparam int THR    = 100;
  localparam int C_LO   = 100;
  localparam int C_HI   = 300;
  localparam int NMODE  = 11;

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

  video_proc_top #(.PPC(PPC), .H_TOTAL(H_TOT)) dut (
    .clk(clk), .rst(rst), .in_pix(in_pix), .in_sb(in_sb), .mode(mode),
    .bin_thr(8'(THR)), .canny_lo(11'(C_LO)), .canny_hi(11'(C_HI)),
    .out_pix(out_pix), .out_sb(out_sb));

  // Reference streams, pixel i stored at i + OFF.
  rgb_t rgb [NPIX + OFF];
  int   g   [NPIX + OFF];
  int   b   [NPIX + OFF];
  int   box [NPIX + OFF];
  int   gau [NPIX + OFF];
  int   sob [NPIX + OFF];
  int   med [NPIX + OFF];
  int   c1  [NPIX + OFF];
  int   c2  [NPIX + OFF];
  int   c3  [NPIX + OFF];
  int   c4  [NPIX + OFF];
  int   ero [NPIX + OFF];
  int   dil [NPIX + OFF];
  int   bmd [NPIX + OFF];
  sb_t  sbh [CYCLES];
  mode_e mode_h [CYCLES];

  int seen [NMODE];
  int changed [NMODE];
  int n_sat = 0, n_weak_kept = 0, n_bin1 = 0, n_bin0 = 0, n_midswitch = 0;

  function automatic win_t window(ref int a [NPIX + OFF], input int i);
    win_t w;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        int j;
        j = i + (r - 1) * H_TOT + (c - 1) + OFF;
        w[r][c] = (j < 0 || j >= NPIX + OFF) ? 0 : a[j];
      end
    return w;
  endfunction

  function automatic rgb_t scene(int x, int y, int f);
    rgb_t p;
    int n;
    n = int'($urandom_range(0, 12));
    p.r = 8'(20 + 6 * x + n);
    p.g = 8'(30 + 10 * y + n);
    p.b = 8'(60 + n);
    if (x >= 8 + f % 3 && x < 18 && y >= 2 && y < 8) p = '{r: 8'(240 - n), g: 8'(230 - n), b: 8'(220)};
    if (x >= 22 && x < 25 && y >= 1) p = '{r: 8'(5 + n), g: 8'(5), b: 8'(5)};
    if (x == 4 && y == 5) p = '{r: 8'd255, g: 8'd255, b: 8'd255};   // isolated spot
    return p;
  endfunction

  function automatic int latency(mode_e md);
    case (md)
      MODE_PASS:                                         return 2;
      MODE_GRAY:                                         return 3;
      MODE_BINARY:                                       return 4;
      MODE_BOX, MODE_GAUSS, MODE_SOBEL, MODE_MEDIAN:     return HSIZE + 6;
      MODE_ERODE, MODE_DILATE, MODE_BMEDIAN:             return HSIZE + 7;
      default:                                           return 4 * (HSIZE + 3) + 3;
    endcase
  endfunction

  function automatic int grey_of(mode_e md, int i);
    case (md)
      MODE_GRAY:    return g[i];
      MODE_BOX:     return box[i];
      MODE_GAUSS:   return gau[i];
      MODE_SOBEL:   return sob[i];
      MODE_MEDIAN:  return med[i];
      MODE_CANNY:   return c4[i] * 255;
      MODE_BINARY:  return b[i] * 255;
      MODE_ERODE:   return ero[i] * 255;
      MODE_DILATE:  return dil[i] * 255;
      default:      return bmd[i] * 255;
    endcase
  endfunction

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < OFF; i++) rgb[i] = '0;
    for (int t = 0; t < CYCLES; t++) begin
      int line, col0, frame;
      frame = t / FRAME;
      line  = (t / HSIZE) % V_TOT;
      col0  = (t % HSIZE) * PPC;
      sbh[t].de = (col0 < H_ACT) && (line < V_ACT);
      sbh[t].hs = (col0 >= H_ACT + 4) && (col0 < H_ACT + 12);
      sbh[t].vs = (line >= V_ACT + 2) && (line < V_ACT + 4);
      for (int p = 0; p < PPC; p++)
        rgb[t * PPC + p + OFF] = sbh[t].de ? scene(col0 + p, line, frame) : '0;
      // one mode per frame, plus a switch in the middle of frame 11
      if (frame < NMODE)       mode_h[t] = mode_e'(frame);
      else if (frame == NMODE) mode_h[t] = (line < V_ACT / 2) ? MODE_SOBEL : MODE_CANNY;
      else                     mode_h[t] = MODE_MEDIAN;
    end
    for (int i = -OFF; i < NPIX; i++) begin
      g[i + OFF] = ref_gray(int'(rgb[i + OFF].r), int'(rgb[i + OFF].g), int'(rgb[i + OFF].b));
      b[i + OFF] = (g[i + OFF] > THR) ? 1 : 0;
    end
    for (int i = -OFF; i < NPIX; i++) begin
      box[i + OFF] = ref_box(window(g, i));
      gau[i + OFF] = ref_gauss(window(g, i));
      sob[i + OFF] = ref_sobel(window(g, i));
      med[i + OFF] = ref_median(window(g, i));
      ero[i + OFF] = ref_erode(window(b, i));
      dil[i + OFF] = ref_dilate(window(b, i));
      bmd[i + OFF] = ref_bmedian(window(b, i));
      c1[i + OFF]  = ref_gauss(window(g, i));
    end
    for (int i = -OFF; i < NPIX; i++) c2[i + OFF] = ref_cgrad(window(c1, i));
    for (int i = -OFF; i < NPIX; i++) c3[i + OFF] = ref_nms(window(c2, i), C_LO, C_HI);
    for (int i = -OFF; i < NPIX; i++) c4[i + OFF] = ref_hyst(window(c3, i));

    rst    = 1'b1;
    in_pix = '0;
    in_sb  = '0;
    mode   = MODE_PASS;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      for (int p = 0; p < PPC; p++) in_pix[p] <= rgb[t * PPC + p + OFF];
      in_sb <= sbh[t];
      mode  <= mode_h[t];
      if (t > 0 && mode_h[t] != mode_h[t - 1] && (t % FRAME) != 0) n_midswitch++;
      @(negedge clk);
      if (t > 0) begin
        mode_e md;
        int m;
        sb_t esb;
        md  = mode_h[t - 1];
        m   = t - latency(md);
        esb = (m < 0) ? sb_t'('0) : sbh[m];
        checks++;
        if (out_sb !== esb) begin
          failures++;
          if (failures < 10) $display("cycle %0d mode %s: sideband %b expected %b", t, md.name(), out_sb, esb);
        end
        for (int k = 0; k < PPC; k++) begin
          int i;
          rgb_t e;
          i = m * PPC + k + OFF;
          if (md == MODE_PASS) e = rgb[i];
          else e = '{r: 8'(grey_of(md, i)), g: 8'(grey_of(md, i)), b: 8'(grey_of(md, i))};
          checks++;
          if (out_pix[k] !== e) begin
            failures++;
            if (failures < 10) $display("cycle %0d mode %s pixel %0d: %h expected %h", t, md.name(), k, out_pix[k], e);
          end
          if (esb.de) begin
            seen[int'(md)]++;
            if (md != MODE_PASS && md != MODE_GRAY && md != MODE_BINARY && md <= MODE_CANNY
                && grey_of(md, i) != g[i]) changed[int'(md)]++;
            if (md >= MODE_ERODE && grey_of(md, i) != b[i] * 255) changed[int'(md)]++;
            if (md == MODE_SOBEL && sob[i] == 255 && iabs(ref_gx(window(g, i - OFF))) + iabs(ref_gy(window(g, i - OFF))) > 255) n_sat++;
            if (md == MODE_CANNY && c3[i] == 1 && c4[i] == 1) n_weak_kept++;
            if (md == MODE_BINARY) begin
              if (b[i] != 0) n_bin1++;
              else n_bin0++;
            end
          end
        end
      end
      @(posedge clk);
    end
    for (int md = 0; md < NMODE; md++) begin
      $display("mode %-12s active pixels %0d changed %0d", mode_e'(md), seen[md], changed[md]);
      checks++;
      if (seen[md] == 0) begin failures++; $display("mode %0d never reached the output", md); end
      if (md inside {[2:6], [8:10]}) begin
        checks++;
        if (changed[md] == 0) begin failures++; $display("filter of mode %0d never changed a pixel", md); end
      end
    end
    $display("sobel saturations %0d, canny weak kept %0d, binary 1/0 %0d/%0d, mid-frame switches %0d",
             n_sat, n_weak_kept, n_bin1, n_bin0, n_midswitch);
    checks += 4;
    if (n_sat == 0)       begin failures++; $display("no Sobel saturation"); end
    if (n_weak_kept == 0) begin failures++; $display("no weak Canny edge kept"); end
    if (n_bin1 == 0 || n_bin0 == 0) begin failures++; $display("binary image constant"); end
    if (n_midswitch == 0) begin failures++; $display("no mid-frame mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
