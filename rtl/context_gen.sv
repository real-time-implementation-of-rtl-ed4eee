// context_gen: KxK context generation for a stream of PPC pixels per clock.
//
// The stream is a sequence of elements, each holding PPC consecutive pixels of a line
// (pixel 0 is the leftmost). As in a one-pixel-per-clock delay line, the generator
// holds K rows of NE element registers; the oldest element of each row enters a
// line_delay of HSIZE-NE cycles whose output feeds the next (older) row, so row r of
// the register array lags the bottom row by exactly K-1-r lines. For K=3 and PPC=2
// the array is 3x3 elements = 18 pixels, of which 12 form the two windows of the
// centre element; for PPC=4 it is 36 pixels of which 18 are used. Each of the PPC
// pixels of the centre element gets its own KxK window, cut from the flat row of
// NE*PPC pixels, so PPC operations can run in parallel on the same clock.
//
// NE is the smallest odd number of elements that covers R=(K-1)/2 pixels on either
// side of every pixel of the centre element: NE = 2*ceil(R/PPC)+1 (3 for K=3).
//
// Interface: din (PPC pixels of W bits, pixel 0 in the low bits), sb_in (SB sideband
// bits such as de/hsync/vsync, stored with the pixels and delayed with them);
// win[k][r][c] is the window of centre pixel k (r=0 top row, c=0 left column), sb_out
// the sideband of the centre element.
// Timing: the register array shifts on every clock; the centre element seen on win
// and sb_out entered R*HSIZE + (NE-1)/2 + 1 cycles earlier. HSIZE is the line length
// in elements, blanking included (total pixels per line / PPC).
//
// The row registers, delay lines of HSIZE minus the row length and the window
// selection follow the document's context scheme; the sideband carried through the
// buffers, the generalisation of NE and the reset are this design's choices. Pixels
// at the left and right image borders see the neighbouring blanking or line samples:
// no border replication is done.
module context_gen #(
  parameter int unsigned PPC   = 4,
  parameter int unsigned W     = 8,
  parameter int unsigned K     = 3,
  parameter int unsigned HSIZE = 1100,
  parameter int unsigned SB    = 3
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [PPC-1:0][W-1:0]                din,
  input  logic [SB-1:0]                        sb_in,
  output logic [PPC-1:0][K-1:0][K-1:0][W-1:0]  win,
  output logic [SB-1:0]                        sb_out
);
  localparam int unsigned R  = (K - 1) / 2;
  localparam int unsigned NE = 2 * ((R + PPC - 1) / PPC) + 1;
  localparam int unsigned CE = (NE - 1) / 2;
  localparam int unsigned EW = PPC * W + SB;

  typedef struct packed {
    logic [SB-1:0]         sb;
    logic [PPC-1:0][W-1:0] pix;
  } elem_t;

  // rows[r][e]: r=0 oldest line (top), e=0 oldest element (left).
  elem_t rows [K][NE];
  elem_t dl_out [K];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < K; r++)
        for (int e = 0; e < NE; e++)
          rows[r][e] <= '0;
    end else begin
      for (int r = 0; r < K; r++) begin
        for (int e = 0; e < NE - 1; e++)
          rows[r][e] <= rows[r][e+1];
        if (r == K - 1) rows[r][NE-1] <= elem_t'{sb: sb_in, pix: din};
        else            rows[r][NE-1] <= dl_out[r];
      end
    end
  end

  // Delay line between the oldest element of row r+1 and the newest of row r.
  for (genvar r = 0; r < K - 1; r++) begin : g_dl
    line_delay #(.WIDTH(EW), .DELAY(HSIZE - NE)) u_dl (
      .clk  (clk),
      .rst  (rst),
      .din  (rows[r+1][0]),
      .dout (dl_out[r])
    );
  end
  assign dl_out[K-1] = '0;  // unused: the bottom row is fed by din

  // Window of centre pixel k: flat row position CE*PPC + k + c - R.
  always_comb begin
    for (int k = 0; k < PPC; k++)
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          automatic int unsigned q = CE * PPC + k + c - R;
          win[k][r][c] = rows[r][q / PPC].pix[q % PPC];
        end
  end

  assign sb_out = rows[R][CE].sb;

  initial begin
    assert (K % 2 == 1) else $error("context_gen: K must be odd");
    assert (HSIZE >= NE + 2) else $error("context_gen: HSIZE too small");
  end
endmodule
