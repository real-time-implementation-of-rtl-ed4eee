// ctx_filter_tb: self-checking test of the contextual filter wrapper.
//
// Every operation is run at 4 and at 2 pixels per clock on a short line length,
// each by a ctx_filter_chk that compares all output pixels and the sideband with a
// reference computed from the stored input stream (this also checks the latency of
// HSIZE + 3 cycles and the rate of one element per clock). An operation whose output
// never leaves zero counts as a failure, so every datapath is really exercised.
module ctx_filter_tb;
  import vid_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int N = 20;
  int   c [N];
  int   f [N];
  int   nz [N];
  logic d [N];

  ctx_filter_chk #(.PPC(4), .HSIZE(10), .OP(OP_BOX), .CYCLES(400)) u0 (.clk(clk), .checks(c[0]), .failures(f[0]), .nonzero(nz[0]), .done(d[0]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_BOX), .CYCLES(400)) u1 (.clk(clk), .checks(c[1]), .failures(f[1]), .nonzero(nz[1]), .done(d[1]));
  ctx_filter_chk #(.PPC(4), .HSIZE(11), .OP(OP_GAUSS), .CYCLES(400)) u2 (.clk(clk), .checks(c[2]), .failures(f[2]), .nonzero(nz[2]), .done(d[2]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_GAUSS), .CYCLES(400)) u3 (.clk(clk), .checks(c[3]), .failures(f[3]), .nonzero(nz[3]), .done(d[3]));
  ctx_filter_chk #(.PPC(4), .HSIZE(12), .OP(OP_SOBEL), .CYCLES(400)) u4 (.clk(clk), .checks(c[4]), .failures(f[4]), .nonzero(nz[4]), .done(d[4]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_SOBEL), .CYCLES(400)) u5 (.clk(clk), .checks(c[5]), .failures(f[5]), .nonzero(nz[5]), .done(d[5]));
  ctx_filter_chk #(.PPC(4), .HSIZE(10), .OP(OP_MEDIAN), .CYCLES(400)) u6 (.clk(clk), .checks(c[6]), .failures(f[6]), .nonzero(nz[6]), .done(d[6]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_MEDIAN), .CYCLES(400)) u7 (.clk(clk), .checks(c[7]), .failures(f[7]), .nonzero(nz[7]), .done(d[7]));
  ctx_filter_chk #(.PPC(4), .HSIZE(11), .OP(OP_ERODE), .CYCLES(400)) u8 (.clk(clk), .checks(c[8]), .failures(f[8]), .nonzero(nz[8]), .done(d[8]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_ERODE), .CYCLES(400)) u9 (.clk(clk), .checks(c[9]), .failures(f[9]), .nonzero(nz[9]), .done(d[9]));
  ctx_filter_chk #(.PPC(4), .HSIZE(12), .OP(OP_DILATE), .CYCLES(400)) u10 (.clk(clk), .checks(c[10]), .failures(f[10]), .nonzero(nz[10]), .done(d[10]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_DILATE), .CYCLES(400)) u11 (.clk(clk), .checks(c[11]), .failures(f[11]), .nonzero(nz[11]), .done(d[11]));
  ctx_filter_chk #(.PPC(4), .HSIZE(10), .OP(OP_BMEDIAN), .CYCLES(400)) u12 (.clk(clk), .checks(c[12]), .failures(f[12]), .nonzero(nz[12]), .done(d[12]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_BMEDIAN), .CYCLES(400)) u13 (.clk(clk), .checks(c[13]), .failures(f[13]), .nonzero(nz[13]), .done(d[13]));
  ctx_filter_chk #(.PPC(4), .HSIZE(11), .OP(OP_CANNY_GRAD), .CYCLES(400)) u14 (.clk(clk), .checks(c[14]), .failures(f[14]), .nonzero(nz[14]), .done(d[14]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_CANNY_GRAD), .CYCLES(400)) u15 (.clk(clk), .checks(c[15]), .failures(f[15]), .nonzero(nz[15]), .done(d[15]));
  ctx_filter_chk #(.PPC(4), .HSIZE(12), .OP(OP_CANNY_NMS), .CYCLES(400)) u16 (.clk(clk), .checks(c[16]), .failures(f[16]), .nonzero(nz[16]), .done(d[16]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_CANNY_NMS), .CYCLES(400)) u17 (.clk(clk), .checks(c[17]), .failures(f[17]), .nonzero(nz[17]), .done(d[17]));
  ctx_filter_chk #(.PPC(4), .HSIZE(10), .OP(OP_CANNY_HYST), .CYCLES(400)) u18 (.clk(clk), .checks(c[18]), .failures(f[18]), .nonzero(nz[18]), .done(d[18]));
  ctx_filter_chk #(.PPC(2), .HSIZE(9), .OP(OP_CANNY_HYST), .CYCLES(400)) u19 (.clk(clk), .checks(c[19]), .failures(f[19]), .nonzero(nz[19]), .done(d[19]));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < N; i++) all_done &= d[i];
    end while (!all_done);
    for (int i = 0; i < N; i++) begin
      checks   += c[i] + 1;
      failures += f[i];
      if (nz[i] == 0) begin
        failures++;
        $display("configuration %0d never produced a non-zero output", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
