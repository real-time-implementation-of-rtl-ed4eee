// binarize_tb: self-checking test of the PPC-wide threshold.
//
// Random grey pixels, 4 per clock, against a threshold that changes every 50
// cycles (including 0 and 255); each output bit is checked one cycle later against
// (pixel > threshold), and the sideband against its one-cycle-delayed input.
module binarize_tb;
  import vid_pkg::*;
  localparam int unsigned PPC = 4;
  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                rst;
  logic [PPC-1:0][7:0] y_in;
  sb_t                 sb_in;
  logic [7:0]          thr;
  logic [PPC-1:0]      b_out;
  sb_t                 sb_out;

  binarize #(.PPC(PPC)) dut (.clk(clk), .rst(rst), .y_in(y_in), .sb_in(sb_in), .thr(thr), .b_out(b_out), .sb_out(sb_out));

  logic [PPC-1:0][7:0] prev_y;
  logic [7:0]          prev_thr;
  sb_t                 prev_sb;

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst   = 1'b1;
    y_in  = '0;
    sb_in = '0;
    thr   = 8'd128;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      if (t % 50 == 0) thr <= (t == 0) ? 8'd0 : (t == 50) ? 8'd255 : 8'($urandom);
      y_in  <= (t < 4) ? {PPC{8'(t == 1 ? 255 : t == 2 ? 254 : 0)}} : (PPC * 8)'($urandom);
      sb_in <= sb_t'($urandom);
      @(negedge clk);
      if (t > 0) begin
        for (int k = 0; k < int'(PPC); k++) begin
          checks++;
          if (b_out[k] !== (prev_y[k] > prev_thr)) begin
            failures++;
            if (failures < 10) $display("cycle %0d pixel %0d: b=%0d y=%0d thr=%0d", t, k, b_out[k], prev_y[k], prev_thr);
          end
        end
        checks++;
        if (sb_out !== prev_sb) failures++;
      end
      prev_y   = y_in;
      prev_thr = thr;
      prev_sb  = sb_in;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
