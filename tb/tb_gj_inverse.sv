// tb_gj_inverse: self-checking test of the Gauss-Jordan inverse at MAXD = 4.
// Random matrices of every size 1..4 (scaled so they are well conditioned,
// with large off-diagonal entries so that row swaps occur) are inverted and
// compared with a floating-point Gauss-Jordan model, as are two matrices with
// zeros on the diagonal that need row swaps; a singular matrix must
// raise singular, and the run time must equal
//   1 + n * (n + DW + FW + 5) clocks.
module tb_gj_inverse;
  import eif_ref_pkg::*;
  localparam int MAXD = 4, DW = 48, FW = 24, IW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [IW-1:0] n = '0;
  logic signed [DW-1:0] a_in [MAXD][MAXD];
  logic signed [DW-1:0] inv  [MAXD][MAXD];
  logic busy, done, singular;

  gj_inverse u_dut (.clk, .rst_n, .start, .n, .a_in, .busy, .done, .singular, .inv);

  int checks = 0, failures = 0, swaps = 0;
  always @(posedge clk)
    if (u_dut.st == 3'd1 /* S_PIVOT */ && u_dut.piv != u_dut.col) swaps++;

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic run(input rmat_t m, input int sz, input bit exp_sing);
    rmat_t ref_inv;
    int cyc;
    @(negedge clk);
    foreach (a_in[i, j]) a_in[i][j] = to_fx(m[i][j]);
    n = IW'(sz);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    foreach (a_in[i, j]) a_in[i][j] = '0;   // only sampled with start
    cyc = 1;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 1 + sz * (sz + DW + FW + 5)) begin
      failures++; $display("FAIL n=%0d latency %0d", sz, cyc);
    end
    if (singular != exp_sing) begin failures++; $display("FAIL singular flag, n=%0d", sz); end
    if (exp_sing) return;
    ref_inv = rinv(m, sz);
    for (int i = 0; i < sz; i++)
      for (int j = 0; j < sz; j++) begin
        real d;
        d = fx2r(inv[i][j]) - ref_inv[i][j];
        if (d < 0) d = -d;
        checks++;
        if (d > 1.0e-4 + 1.0e-4 * (ref_inv[i][j] < 0 ? -ref_inv[i][j] : ref_inv[i][j])) begin
          failures++;
          $display("FAIL n=%0d inv[%0d][%0d] got %f expected %f", sz, i, j,
                   fx2r(inv[i][j]), ref_inv[i][j]);
        end
      end
  endtask

  initial begin
    rmat_t m;
    foreach (a_in[i, j]) a_in[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int sz;
      sz = 1 + t % MAXD;
      m = rzero();
      for (int i = 0; i < sz; i++)
        for (int j = 0; j < sz; j++)
          m[i][j] = (i == j) ? urand(1.0, 4.0) : urand(-6.0, 6.0);
      if (rinv(m, sz)[0][0] > 100.0 || rinv(m, sz)[0][0] < -100.0) m[0][0] += 5.0;
      run(m, sz, 1'b0);
    end
    // zero on the diagonal: only correct with row swaps
    m = rzero();
    m[0][1] = 2.0; m[1][0] = -1.5; m[2][3] = 1.0; m[3][2] = 3.0; m[3][0] = 0.5;
    run(m, 4, 1'b0);
    m = rzero();
    m[0][2] = 1.0; m[1][0] = 2.0; m[2][1] = -0.5;
    run(m, 3, 1'b0);
    // singular: two equal rows
    m = rzero();
    m[0][0] = 1.0; m[0][1] = 2.0; m[1][0] = 1.0; m[1][1] = 2.0; m[2][2] = 1.0;
    run(m, 3, 1'b1);
    checks++;
    if (swaps == 0) begin failures++; $display("FAIL no row swap happened"); end
    $display("row swaps: %0d", swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
