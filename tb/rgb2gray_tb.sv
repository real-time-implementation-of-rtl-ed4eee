// rgb2gray_tb: self-checking test of the PPC-wide RGB to grey conversion.
//
// Feeds corner colours (black, white, pure R/G/B) and random RGB pixels, 4 per
// clock, with random sideband, and checks one cycle later each output against
// round((77R + 150G + 29B) / 256) computed here, and that the sideband is delayed
// by exactly one cycle.
module rgb2gray_tb;
  import vid_pkg::*;
  localparam int unsigned PPC = 4;
  localparam int unsigned CYCLES = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                rst;
  rgb_t [PPC-1:0]      rgb_in;
  sb_t                 sb_in;
  logic [PPC-1:0][7:0] y_out;
  sb_t                 sb_out;

  rgb2gray #(.PPC(PPC)) dut (.clk(clk), .rst(rst), .rgb_in(rgb_in), .sb_in(sb_in), .y_out(y_out), .sb_out(sb_out));

  rgb_t [PPC-1:0] prev_rgb;
  sb_t            prev_sb;

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst    = 1'b1;
    rgb_in = '0;
    sb_in  = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      for (int k = 0; k < int'(PPC); k++) begin
        case (t)
          0: rgb_in[k] <= '{r: 8'd0,   g: 8'd0,   b: 8'd0};
          1: rgb_in[k] <= '{r: 8'd255, g: 8'd255, b: 8'd255};
          2: rgb_in[k] <= '{r: 8'd255, g: 8'd0,   b: 8'd0};
          3: rgb_in[k] <= '{r: 8'd0,   g: 8'd255, b: 8'd0};
          4: rgb_in[k] <= '{r: 8'd0,   g: 8'd0,   b: 8'd255};
          default: rgb_in[k] <= rgb_t'($urandom);
        endcase
      end
      sb_in <= sb_t'($urandom);
      @(negedge clk);
      if (t > 0) begin
        for (int k = 0; k < int'(PPC); k++) begin
          int exp;
          exp = (77 * int'(prev_rgb[k].r) + 150 * int'(prev_rgb[k].g) + 29 * int'(prev_rgb[k].b) + 128) / 256;
          checks++;
          if (int'(y_out[k]) != exp) begin
            failures++;
            if (failures < 10) $display("cycle %0d pixel %0d: y=%0d expected %0d", t, k, y_out[k], exp);
          end
        end
        checks++;
        if (sb_out !== prev_sb) failures++;
      end
      prev_rgb = rgb_in;
      prev_sb  = sb_in;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
