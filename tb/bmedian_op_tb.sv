// bmedian_op_tb: self-checking test of bmedian_op (binary median).
//
// Applies corner-case windows (all zero, all maximum, single set pixels) and random
// windows of varied contrast, one per clock, and compares pix with a reference
// computed here from the window values with plain integer arithmetic.
module bmedian_op_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [2:0][2:0][0:0] win;
  logic [0:0]           pix;

  bmedian_op dut (.win(win), .pix(pix));

  function automatic int ref_pix(logic [2:0][2:0][0:0] w);
    int v [3][3];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        v[r][c] = int'(w[r][c]);
    begin
      int a [9];
      foreach (v[r, c]) a[r * 3 + c] = v[r][c];
      a.sort();
      return a[4];
    end
  endfunction

  localparam int MAXV = (1 << 1) - 1;

  task automatic make_window(int n);
    int base, spread, mode;
    mode = n < 20 ? n : 20 + int'($urandom_range(0, 1));
    base = int'($urandom_range(0, MAXV));
    spread = int'($urandom_range(0, MAXV));
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        case (mode)
          0: win[r][c] = '0;
          1: win[r][c] = MAXV;
          2, 3, 4, 5, 6, 7, 8, 9, 10: win[r][c] = (r * 3 + c == mode - 2) ? MAXV : 0;
          11, 12, 13, 14, 15, 16, 17, 18, 19: win[r][c] = (r * 3 + c == mode - 11) ? 0 : MAXV;
          20: win[r][c] = $urandom_range(0, MAXV);
          default: begin
            int x;
            x = base + int'($urandom_range(0, spread)) - spread / 2;
            if (x < 0) x = 0;
            if (x > MAXV) x = MAXV;
            win[r][c] = 1'(x);
          end
        endcase
      end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      make_window(n);
      #1;
      checks++;
      if (int'(pix) != ref_pix(win)) begin
        failures++;
        if (failures < 10) $display("mismatch: win=%h pix=%0d expected=%0d", win, pix, ref_pix(win));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
