// line_delay: the "HSIZE - 3" delay line of the context generator.
//
// A circular buffer: one address counter walks a RAM of DELAY-1 words; each clock the
// word at the counter is read into an output register and overwritten by the new
// input, so dout(t) = din(t - DELAY). The buffer shifts on every clock, blanking
// included, as the context generator it serves does. The RAM is not reset; a flag
// set when the counter first wraps forces dout to zero until the RAM holds data
// written since reset, so the first lines after reset read as black.
//
// Interface: clk, rst (synchronous, active high), din/dout of WIDTH bits.
// Timing: fixed latency of exactly DELAY cycles (DELAY >= 2), one word per clock.
// The document gives the delay (line length minus the row registers); the RAM
// organisation and the zero-fill after reset are this design's choices.
module line_delay #(
  parameter int unsigned WIDTH = 35,
  parameter int unsigned DELAY = 1097
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned DEPTH = DELAY - 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;
  logic             filled;      // RAM holds only data written since reset
  logic             filled_q;
  logic [WIDTH-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr    <= '0;
      filled <= 1'b0;
    end else begin
      if (ptr == AW'(DEPTH - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  // Read-before-write at the same address.
  always_ff @(posedge clk) begin
    rd_q      <= mem[ptr];
    mem[ptr]  <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) filled_q <= 1'b0;
    else     filled_q <= filled;
  end

  assign dout = filled_q ? rd_q : '0;

  initial begin
    assert (DELAY >= 2) else $error("line_delay: DELAY must be at least 2");
  end
endmodule
