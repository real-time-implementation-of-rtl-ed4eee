// canny_edge_tb: end-to-end test of the four-stage Canny pipeline.
//
// A synthetic 4 pixel/clock raster (40 pixels per line including blanking, 24
// lines, two frames) holds a high-contrast rectangle, a low-contrast rectangle, a
// diagonal edge and mild noise. The expected edge map is computed here stage by
// stage on the flat pixel stream (Gaussian, gradient, non-maximum suppression with
// double threshold, hysteresis), with the same window rule as the hardware
// (pixel i + (r-1)*line + (c-1), zero before the first pixel after reset). Every
// output bit and the sideband are compared at latency 4*(HSIZE+3). The test also
// counts strong edges, weak pixels kept by hysteresis, weak pixels dropped and
// pixels removed by non-maximum suppression, and fails if any of them never occurs.
module canny_edge_tb;
  import vid_pkg::*;
  import img_ref_pkg::*;

  localparam int PPC     = 4;
  localparam int H_TOT   = 40;
  localparam int HSIZE   = H_TOT / PPC;
  localparam int V_TOT   = 24;
  localparam int FRAMES  = 2;
  localparam int CYCLES  = HSIZE * V_TOT * FRAMES + 5 * HSIZE;
  localparam int NPIX    = CYCLES * PPC;
  localparam int OFF     = 6 * (H_TOT + 2);
  localparam int LAT     = 4 * (HSIZE + 3);
  localparam int TH_LO   = 100;
  localparam int TH_HI   = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                rst;
  logic [PPC-1:0][7:0] y_in;
  sb_t                 sb_in;
  logic [PPC-1:0]      e_out;
  sb_t                 sb_out;

  canny_edge #(.PPC(PPC), .HSIZE(HSIZE)) dut (
    .clk(clk), .rst(rst), .y_in(y_in), .sb_in(sb_in), .th_lo(11'(TH_LO)), .th_hi(11'(TH_HI)),
    .e_out(e_out), .sb_out(sb_out));

  // Stage arrays, index i stored at i + OFF.
  int  s0 [NPIX + OFF];
  int  s1 [NPIX + OFF];
  int  s2 [NPIX + OFF];
  int  s3 [NPIX + OFF];
  int  s4 [NPIX + OFF];
  sb_t sbh [CYCLES];

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

  function automatic int scene(int x, int y);
    int v;
    v = 40;
    if (x >= 6 && x < 18 && y >= 4 && y < 14) v = 200;      // strong rectangle
    if (x >= 22 && x < 32 && y >= 6 && y < 16) v = 80;      // weak rectangle
    if (x + y > 40 && x < 36) v += 35;                      // diagonal step
    return v + int'($urandom_range(0, 6));
  endfunction

  int n_strong = 0, n_weak_kept = 0, n_weak_drop = 0, n_suppr = 0;

  initial begin : watchdog
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Build the input stream (blanking pixels are zero) and its sideband.
    for (int i = 0; i < OFF; i++) s0[i] = 0;
    for (int t = 0; t < CYCLES; t++) begin
      int line, col0;
      line = (t / HSIZE) % V_TOT;
      col0 = (t % HSIZE) * PPC;
      sbh[t].de = (col0 < 32) && (line < 20);
      sbh[t].hs = (col0 >= 34) && (col0 < 38);
      sbh[t].vs = (line >= 21) && (line < 23);
      for (int p = 0; p < PPC; p++)
        s0[t * PPC + p + OFF] = sbh[t].de ? scene(col0 + p, line) : 0;
    end
    // Reference pipeline.
    for (int i = -OFF; i < NPIX; i++) s1[i + OFF] = ref_gauss(window(s0, i));
    for (int i = -OFF; i < NPIX; i++) s2[i + OFF] = ref_cgrad(window(s1, i));
    for (int i = -OFF; i < NPIX; i++) s3[i + OFF] = ref_nms(window(s2, i), TH_LO, TH_HI);
    for (int i = -OFF; i < NPIX; i++) s4[i + OFF] = ref_hyst(window(s3, i));
    for (int i = 0; i < NPIX; i++) begin
      if (s3[i + OFF] == 2) n_strong++;
      if (s3[i + OFF] == 1 && s4[i + OFF] == 1) n_weak_kept++;
      if (s3[i + OFF] == 1 && s4[i + OFF] == 0) n_weak_drop++;
      if (s3[i + OFF] == 0 && s2[i + OFF] % 2048 >= TH_LO) n_suppr++;
    end

    rst   = 1'b1;
    y_in  = '0;
    sb_in = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      for (int p = 0; p < PPC; p++) y_in[p] <= 8'(s0[t * PPC + p + OFF]);
      sb_in <= sbh[t];
      @(negedge clk);
      begin
        int m;
        m = t - LAT;
        checks++;
        if (sb_out !== ((m < 0) ? sb_t'('0) : sbh[m])) begin
          failures++;
          if (failures < 10) $display("cycle %0d: sideband mismatch", t);
        end
        for (int k = 0; k < PPC; k++) begin
          int e;
          e = s4[m * PPC + k + OFF];
          checks++;
          if (int'(e_out[k]) != e) begin
            failures++;
            if (failures < 10) $display("cycle %0d pixel %0d: edge=%0d expected %0d", t, k, e_out[k], e);
          end
        end
      end
      @(posedge clk);
    end
    $display("strong=%0d weak_kept=%0d weak_dropped=%0d suppressed=%0d",
             n_strong, n_weak_kept, n_weak_drop, n_suppr);
    checks += 4;
    if (n_strong == 0)    begin failures++; $display("no strong edge pixel"); end
    if (n_weak_kept == 0) begin failures++; $display("hysteresis never kept a weak pixel"); end
    if (n_weak_drop == 0) begin failures++; $display("hysteresis never dropped a weak pixel"); end
    if (n_suppr == 0)     begin failures++; $display("non-maximum suppression never acted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
