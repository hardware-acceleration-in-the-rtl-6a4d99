// tb_inv2x2: self-checking test of the 2 x 2 formula inverse. Random
// symmetric and asymmetric matrices are inverted and each entry compared with
// the closed-form inverse computed in floating point; a zero determinant must
// raise singular, and every inverse must take DW+FW+5 clocks.
module tb_inv2x2;
  import eif_ref_pkg::*;
  localparam int DW = 48, FW = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic signed [DW-1:0] a_in [2][2];
  logic signed [DW-1:0] inv  [2][2];
  logic busy, done, singular;

  inv2x2 u_dut (.clk, .rst_n, .start, .a_in, .busy, .done, .singular, .inv);

  int checks = 0, failures = 0;

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic run(input real a, input real b, input real c, input real d, input bit exp_sing);
    real det, e [2][2];
    int cyc;
    @(negedge clk);
    a_in[0][0] = to_fx(a); a_in[0][1] = to_fx(b); a_in[1][0] = to_fx(c); a_in[1][1] = to_fx(d);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != DW + FW + 5) begin failures++; $display("FAIL latency %0d", cyc); end
    if (singular != exp_sing) begin failures++; $display("FAIL singular flag"); end
    if (exp_sing) return;
    det = a * d - b * c;
    e[0][0] = d / det; e[0][1] = -b / det; e[1][0] = -c / det; e[1][1] = a / det;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        real x;
        x = fx2r(inv[i][j]) - e[i][j];
        if (x < 0) x = -x;
        checks++;
        if (x > 1.0e-4 + 1.0e-4 * (e[i][j] < 0 ? -e[i][j] : e[i][j])) begin
          failures++;
          $display("FAIL inv[%0d][%0d] got %f expected %f", i, j, fx2r(inv[i][j]), e[i][j]);
        end
      end
  endtask

  initial begin
    foreach (a_in[i, j]) a_in[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      real a, b, c, d;
      a = urand(1.0, 10.0); d = urand(1.0, 10.0); b = urand(-0.9, 0.9);
      c = (t % 2 == 0) ? b : urand(-0.9, 0.9);
      run(a, b, c, d, 1'b0);
    end
    run(2.0, 4.0, 1.0, 2.0, 1'b1);
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
