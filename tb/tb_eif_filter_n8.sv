// tb_eif_filter_n8: end-to-end test of the information-filter IP as a
// 8-state filter (13 sensor inputs, 48-bit words with 24 fraction bits).
//
// Runs ITERS filter iterations with random step times, noise vectors, sensor
// values and measurements. The first and the ITERS/2-th iteration initialise
// the filter (filt_init), the others continue from the previous information
// vector and matrix. After each iteration the state estimate and the new
// information vector are compared with a floating-point model, the iteration
// time is checked against the 3,826-clock budget of the 8-state filter IP,
// and the mechanisms are counted: initialisation and continuation, the
// N/2 x N/2 inverses (done by the shared Gauss-Jordan unit at this size),
// the N x N Gauss-Jordan inverses and their row swaps.
module tb_eif_filter_n8;
  import eif_ref_pkg::*;

  localparam int N      = 8;
  localparam int M      = 13;
  localparam int ITERS  = 8;
  localparam int BUDGET = 3826;   // clocks per iteration, 8-state filter IP

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start = 1'b0, filt_init = 1'b0;
  logic signed [47:0] step_t = '0;
  logic signed [47:0] q_diag [N/2];
  logic signed [47:0] r_diag [M];
  logic signed [47:0] h_var  [M];
  logic signed [47:0] y      [M];
  logic signed [47:0] init_vec [N];
  logic signed [47:0] init_diag [N];
  logic               busy, done, singular;
  logic signed [47:0] x_out [N];
  logic signed [47:0] info_vec [N];

  eif_filter #(.N(N)) u_dut (
    .clk, .rst_n, .start, .filt_init, .step_t, .q_diag, .r_diag, .h_var, .y,
    .init_vec, .init_diag, .busy, .done, .singular, .x_out, .info_vec
  );

  int checks = 0, failures = 0;
  int n_init = 0, n_cont = 0, n_inv2 = 0, n_gj = 0, n_swap = 0;

  // mechanism counters, observed inside the design
  always @(posedge clk) begin
    if (u_dut.u_gj.done && u_dut.u_gj.n_q == (N / 2)) n_inv2++;
    if (u_dut.u_gj.done) n_gj++;
    if (u_dut.u_gj.st == 3'd1 /* S_PIVOT */ && u_dut.u_gj.piv != u_dut.u_gj.col) n_swap++;
  end

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  function automatic bit close(input real got, input real exp);
    real d, tol;
    d   = got - exp;
    if (d < 0) d = -d;
    tol = 1.0e-3 + 1.0e-3 * (exp < 0 ? -exp : exp);
    return d <= tol;
  endfunction

  task automatic check(input string what, input real got, input real exp);
    checks++;
    if (!close(got, exp)) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    rmat_t iv, im, xo;
    real   qd[], rd[], hv[], yv[];
    real   t;
    int    cyc;
    qd = new[N/2]; rd = new[M]; hv = new[M]; yv = new[M];
    iv = rzero(); im = rzero();
    foreach (q_diag[i]) q_diag[i] = '0;
    foreach (r_diag[i]) begin r_diag[i] = '0; h_var[i] = '0; y[i] = '0; end
    foreach (init_vec[i]) begin init_vec[i] = '0; init_diag[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int it = 0; it < ITERS; it++) begin
      bit do_init;
      do_init = (it == 0) || (it == ITERS / 2);
      t = urand(0.2, 1.0);
      step_t = to_fx(t);
      foreach (qd[i]) begin qd[i] = urand(0.5, 4.0); q_diag[i] = to_fx(qd[i]); end
      foreach (rd[i]) begin
        rd[i] = urand(0.1, 1.0); r_diag[i] = to_fx(rd[i]);
        hv[i] = urand(-1.0, 1.0); h_var[i] = to_fx(hv[i]);
        yv[i] = urand(-3.0, 3.0); y[i] = to_fx(yv[i]);
      end
      if (do_init) begin
        iv = rzero(); im = rzero();
        for (int i = 0; i < N; i++) begin
          real a, b;
          a = urand(-5.0, 5.0); b = (i % 2 == 0) ? urand(0.5, 2.0) : urand(40.0, 80.0);
          iv[i][0] = a; im[i][i] = b;
          init_vec[i] = to_fx(a); init_diag[i] = to_fx(b);
        end
        n_init++;
      end else begin
        n_cont++;
      end
      filt_init = do_init;
      iterate(N, M, t, qd, rd, hv, yv, iv, im, xo);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      filt_init = 1'b0;
      cyc = 1;
      while (!done && cyc < 20000) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc > BUDGET) begin
        failures++;
        $display("FAIL iteration %0d took %0d clocks, budget %0d", it, cyc, BUDGET);
      end
      checks++;
      if (singular) begin
        failures++;
        $display("FAIL iteration %0d reported a singular matrix", it);
      end
      for (int i = 0; i < N; i++) begin
        check($sformatf("it %0d x[%0d]", it, i), fx2r(x_out[i]), xo[i][0]);
        check($sformatf("it %0d i[%0d]", it, i), fx2r(info_vec[i]), iv[i][0]);
      end
      $display("iteration %0d: %0d clocks, x[0..3] = %f %f %f %f", it, cyc,
               fx2r(x_out[0]), fx2r(x_out[1]), fx2r(x_out[2]), fx2r(x_out[3]));
    end
    // every mechanism must have happened at least once
    checks += 5;
    if (n_init == 0) begin failures++; $display("FAIL no initialising iteration"); end
    if (n_cont == 0) begin failures++; $display("FAIL no continuing iteration"); end
    if (n_inv2 == 0) begin failures++; $display("FAIL N/2 inverse never ran"); end
    if (n_gj   == 0) begin failures++; $display("FAIL Gauss-Jordan inverse never ran"); end
    if (n_swap == 0) begin failures++; $display("FAIL no pivot row swap"); end
    $display("mechanisms: init %0d, continue %0d, N/2 inverses %0d, GJ inverses %0d, row swaps %0d",
             n_init, n_cont, n_inv2, n_gj, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ITERS * (BUDGET + 500) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
