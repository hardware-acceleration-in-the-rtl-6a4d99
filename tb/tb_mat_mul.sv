// tb_mat_mul: self-checking test of the matrix multiplier at MAXD = 13.
// Random fixed-point operands, random sizes and all four transpose
// combinations; each streamed element is compared with an exact integer
// model (full-precision sum, then an arithmetic shift by FW), every element
// must arrive exactly once, and done must come rows*cols+1 clocks after start.
module tb_mat_mul;
  localparam int MAXD = 13, DW = 48, FW = 24, IW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, ta = 1'b0, tb = 1'b0;
  logic [IW-1:0] rows = '0, cols = '0, inner = '0;
  logic signed [DW-1:0] a [MAXD][MAXD];
  logic signed [DW-1:0] b [MAXD][MAXD];
  logic busy, wr_en, done;
  logic [IW-1:0] wr_row, wr_col;
  logic signed [DW-1:0] wr_data;

  mat_mul u_dut (.clk, .rst_n, .start, .rows, .cols, .inner, .ta, .tb, .a, .b,
                 .busy, .wr_en, .wr_row, .wr_col, .wr_data, .done);

  int checks = 0, failures = 0;
  logic signed [DW-1:0] got [MAXD][MAXD];
  int seen [MAXD][MAXD];

  always @(posedge clk)
    if (wr_en) begin
      got[wr_row][wr_col] <= wr_data;
      seen[wr_row][wr_col] <= seen[wr_row][wr_col] + 1;
    end

  initial begin
    foreach (a[i, j]) begin a[i][j] = '0; b[i][j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int r, c, k, cyc;
      r = 1 + $urandom % MAXD; c = 1 + $urandom % MAXD; k = 1 + $urandom % MAXD;
      if (t == 0) begin r = MAXD; c = MAXD; k = MAXD; end
      @(negedge clk);
      foreach (a[i, j]) begin
        a[i][j] = DW'(longint'($urandom % 2000000000) - 64'sd1000000000);
        b[i][j] = DW'(longint'($urandom % 2000000000) - 64'sd1000000000);
        seen[i][j] = 0;
      end
      rows = IW'(r); cols = IW'(c); inner = IW'(k); ta = t[0]; tb = t[1];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != r * c + 1) begin failures++; $display("FAIL latency %0d for %0dx%0d", cyc, r, c); end
      @(negedge clk);   // the last element is captured at the clock after done
      for (int i = 0; i < r; i++)
        for (int j = 0; j < c; j++) begin
          logic signed [127:0] acc;
          logic signed [DW-1:0] exp;
          acc = '0;
          for (int l = 0; l < k; l++)
            acc += 128'(ta ? a[l][i] : a[i][l]) * 128'(tb ? b[j][l] : b[l][j]);
          exp = DW'(acc >>> FW);
          checks++;
          if (got[i][j] !== exp || seen[i][j] != 1) begin
            failures++;
            $display("FAIL test %0d C[%0d][%0d] got %0d expected %0d (seen %0d)",
                     t, i, j, got[i][j], exp, seen[i][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
