// line_delay_tb: self-checking test of the circular-buffer delay line.
//
// Two instances (DELAY = 13, and the smallest legal DELAY = 2) are fed random words
// every clock after reset. The test keeps the history of inputs and checks every
// clock that dout is zero for the first DELAY cycles after reset and afterwards
// equals the input of exactly DELAY cycles earlier (the latency check).
module line_delay_tb;
  localparam int unsigned WIDTH = 12;
  localparam int unsigned D0 = 13;
  localparam int unsigned D1 = 2;
  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic             rst;
  logic [WIDTH-1:0] din;
  logic [WIDTH-1:0] dout0, dout1;
  logic [WIDTH-1:0] hist [CYCLES];

  line_delay #(.WIDTH(WIDTH), .DELAY(D0)) dut0 (.clk(clk), .rst(rst), .din(din), .dout(dout0));
  line_delay #(.WIDTH(WIDTH), .DELAY(D1)) dut1 (.clk(clk), .rst(rst), .din(din), .dout(dout1));

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned dly, logic [WIDTH-1:0] got, int t);
    logic [WIDTH-1:0] exp;
    exp = (t < int'(dly)) ? '0 : hist[t - int'(dly)];
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("DELAY=%0d cycle %0d: dout=%h expected %h", dly, t, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    din = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < CYCLES; t++) begin
      din <= WIDTH'($urandom);
      @(negedge clk);
      hist[t] = din;
      check(D0, dout0, t);
      check(D1, dout1, t);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
