// context_gen_tb: self-checking test of the multi-pixel context generator.
//
// Runs four configurations side by side: the 2 pixel/clock 3x3 scheme, the
// 4 pixel/clock 3x3 scheme, a 1 pixel/clock 3x3 delay line and a 2 pixel/clock 7x7
// context (which needs five elements per row). Each checker compares every window
// pixel and the centre sideband against the stored input stream every clock,
// which also checks the latency R*HSIZE + CE + 1.
module context_gen_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  int   c_a, f_a, c_b, f_b, c_c, f_c, c_d, f_d;
  logic d_a, d_b, d_c, d_d;

  context_gen_chk #(.PPC(2), .K(3), .HSIZE(9),  .CYCLES(300)) u_a (.clk(clk), .checks(c_a), .failures(f_a), .done(d_a));
  context_gen_chk #(.PPC(4), .K(3), .HSIZE(8),  .CYCLES(300)) u_b (.clk(clk), .checks(c_b), .failures(f_b), .done(d_b));
  context_gen_chk #(.PPC(1), .K(3), .HSIZE(10), .CYCLES(300)) u_c (.clk(clk), .checks(c_c), .failures(f_c), .done(d_c));
  context_gen_chk #(.PPC(2), .K(7), .HSIZE(11), .CYCLES(300)) u_d (.clk(clk), .checks(c_d), .failures(f_d), .done(d_d));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (d_a && d_b && d_c && d_d);
    checks   = c_a + c_b + c_c + c_d;
    failures = f_a + f_b + f_c + f_d;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
