// context_gen_chk: drives one context_gen configuration and checks all its windows.
//
// Random PPC-pixel elements and sideband values are fed every clock after reset.
// Pixel i of the stream (element i/PPC, position i%PPC) is stored; during cycle t the
// centre element is element m = t - LAT with LAT = R*HSIZE + CE + 1, and window k
// must hold pixel m*PPC + k + (r-R)*HSIZE*PPC + (c-R) at [r][c]; pixels before the
// first element after reset must read as zero. sb_out must be the sideband of
// element m. Results are reported through checks/failures when done rises.
module context_gen_chk #(
  parameter int unsigned PPC    = 2,
  parameter int unsigned K      = 3,
  parameter int unsigned HSIZE  = 9,
  parameter int unsigned CYCLES = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned W  = 8;
  localparam int unsigned SB = 3;
  localparam int R   = (K - 1) / 2;
  localparam int NE  = 2 * ((R + PPC - 1) / PPC) + 1;
  localparam int CE  = (NE - 1) / 2;
  localparam int LAT = R * HSIZE + CE + 1;

  logic                                rst;
  logic [PPC-1:0][W-1:0]               din;
  logic [SB-1:0]                       sb_in;
  logic [PPC-1:0][K-1:0][K-1:0][W-1:0] win;
  logic [SB-1:0]                       sb_out;

  logic [W-1:0]  pix_h [CYCLES * PPC];
  logic [SB-1:0] sb_h  [CYCLES];

  context_gen #(.PPC(PPC), .W(W), .K(K), .HSIZE(HSIZE), .SB(SB)) dut (
    .clk(clk), .rst(rst), .din(din), .sb_in(sb_in), .win(win), .sb_out(sb_out));

  function automatic logic [W-1:0] pix_at(int i);
    return (i < 0) ? '0 : pix_h[i];
  endfunction

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    rst      = 1'b1;
    din      = '0;
    sb_in    = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      din   <= (PPC * W)'({$urandom, $urandom, $urandom, $urandom});
      sb_in <= SB'($urandom);
      @(negedge clk);
      for (int p = 0; p < int'(PPC); p++) pix_h[t * PPC + p] = din[p];
      sb_h[t] = sb_in;
      begin
        int m;
        m = t - LAT;
        checks++;
        if (sb_out !== ((m < 0) ? '0 : sb_h[m])) begin
          failures++;
          if (failures < 10) $display("PPC=%0d K=%0d cycle %0d: sb_out=%h", PPC, K, t, sb_out);
        end
        for (int k = 0; k < int'(PPC); k++)
          for (int r = 0; r < int'(K); r++)
            for (int c = 0; c < int'(K); c++) begin
              logic [W-1:0] exp;
              exp = pix_at(m * int'(PPC) + k + (r - R) * int'(HSIZE * PPC) + (c - R));
              checks++;
              if (win[k][r][c] !== exp) begin
                failures++;
                if (failures < 10)
                  $display("PPC=%0d K=%0d cycle %0d win[%0d][%0d][%0d]=%h expected %h",
                           PPC, K, t, k, r, c, win[k][r][c], exp);
              end
            end
      end
      @(posedge clk);
    end
    done = 1'b1;
  end
endmodule
