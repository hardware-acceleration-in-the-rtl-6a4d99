// tb_eif_accel: end-to-end test of the filter accelerator at its default
// parameters (4 states, 13 sensors), with a shared-memory model.
//
// The testbench plays the processor: for each command it writes an input
// block of random values into the memory model, starts the accelerator and,
// when it reports done, reads the results back from memory and compares
// them with a floating-point model of the filter. The memory model stalls
// requests (grant low) and returns read data after 1 to 3 clocks at random.
// Checked per command: every result word, the number of words read (50) and
// written (9), the compute time against the 1,360-clock budget of the
// four-state filter IP and the memory-transfer time against its 854-cycle
// transfer budget. Counted mechanisms, each of which must happen: an
// initialising command, a continuing command, a stalled memory request, a
// 2 x 2 formula inverse, a Gauss-Jordan inverse and a pivot row swap.
module tb_eif_accel;
  import eif_ref_pkg::*;

  localparam int N = 4, M = 13, AW = 32;
  localparam int CMDS = 6;
  localparam int NIN = 1 + N/2 + 3*M + 2*N, NOUT = 2*N + 1;
  localparam int BUDGET = 1360, XFER_BUDGET = 854;
  localparam int MEMW = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          cmd_start = 1'b0, cmd_init = 1'b0;
  logic [AW-1:0] in_base = '0, out_base = '0;
  logic          cmd_busy, cmd_done;
  logic          mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [63:0]   mem_wdata, mem_rdata;

  eif_accel u_dut (
    .clk, .rst_n, .cmd_start, .cmd_init, .in_base, .out_base, .cmd_busy, .cmd_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata
  );

  // ---------------------------------------------------------- memory model
  logic [63:0] mem [MEMW];
  int          rd_wait;           // clocks until the pending read returns
  logic [AW-1:0] rd_addr;
  logic        rd_pend;
  int n_reads = 0, n_writes = 0, n_stalls = 0;

  always_ff @(posedge clk) begin
    mem_rvalid <= 1'b0;
    mem_gnt    <= ($urandom % 4) != 0 && !rd_pend;
    if (mem_req && !mem_gnt) n_stalls++;
    if (mem_req && mem_gnt) begin
      if (mem_we) begin
        mem[mem_addr % MEMW] <= mem_wdata;
        n_writes++;
      end else begin
        rd_pend <= 1'b1;
        rd_addr <= mem_addr;
        rd_wait <= $urandom % 3;
        mem_gnt <= 1'b0;
        n_reads++;
      end
    end
    if (rd_pend) begin
      if (rd_wait == 0) begin
        mem_rvalid <= 1'b1;
        mem_rdata  <= mem[rd_addr % MEMW];
        rd_pend    <= 1'b0;
      end else begin
        rd_wait <= rd_wait - 1;
      end
    end
  end

  int checks = 0, failures = 0;
  int n_init = 0, n_cont = 0, n_inv2 = 0, n_gj = 0, n_swap = 0;
  int compute_cyc = 0, xfer_cyc = 0;
  always @(posedge clk) begin
    if (u_dut.u_filter.g_formula.u_inv2.done) n_inv2++;
    if (u_dut.u_filter.u_gj.done) n_gj++;
    if (u_dut.u_filter.u_gj.st == 3'd1 /* S_PIVOT */ &&
        u_dut.u_filter.u_gj.piv != u_dut.u_filter.u_gj.col) n_swap++;
    if (u_dut.u_filter.busy) compute_cyc++;
    else if (cmd_busy) xfer_cyc++;
  end

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  task automatic check(input string what, input real got, input real exp);
    real d;
    d = got - exp;
    if (d < 0) d = -d;
    checks++;
    if (d > 1.0e-3 + 1.0e-3 * (exp < 0 ? -exp : exp)) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    rmat_t iv, im, xo;
    real   qd[], rd[], hv[], yv[];
    real   t;
    qd = new[N/2]; rd = new[M]; hv = new[M]; yv = new[M];
    iv = rzero(); im = rzero();
    rd_pend = 1'b0; rd_wait = 0; rd_addr = '0; mem_rdata = '0;
    foreach (mem[i]) mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CMDS; c++) begin
      bit do_init;
      int a, r0, w0, ib, ob;
      do_init = (c == 0) || (c == CMDS / 2);
      ib = 16 + (c % 2) * 80;          // alternate buffers
      ob = 200 + (c % 2) * 20;
      t = urand(0.2, 1.0);
      a = ib;
      mem[a++] = 64'(to_fx(t));
      foreach (qd[i]) begin qd[i] = urand(0.5, 4.0); mem[a++] = 64'(to_fx(qd[i])); end
      foreach (rd[i]) begin rd[i] = urand(0.1, 1.0);  mem[a++] = 64'(to_fx(rd[i])); end
      foreach (hv[i]) begin hv[i] = urand(-1.0, 1.0); mem[a++] = 64'(to_fx(hv[i])); end
      foreach (yv[i]) begin yv[i] = urand(-3.0, 3.0); mem[a++] = 64'(to_fx(yv[i])); end
      if (do_init) begin
        iv = rzero(); im = rzero();
        for (int i = 0; i < N; i++) iv[i][0] = urand(-5.0, 5.0);
        for (int i = 0; i < N; i++) im[i][i] = (i % 2 == 0) ? urand(0.5, 2.0) : urand(40.0, 80.0);
        n_init++;
      end else begin
        n_cont++;
      end
      // the initialisation fields are always present; they are used only with cmd_init
      for (int i = 0; i < N; i++) mem[a++] = 64'(to_fx(do_init ? iv[i][0] : 1.0));
      for (int i = 0; i < N; i++) mem[a++] = 64'(to_fx(do_init ? im[i][i] : 1.0));
      iterate(N, M, t, qd, rd, hv, yv, iv, im, xo);
      r0 = n_reads; w0 = n_writes; compute_cyc = 0; xfer_cyc = 0;
      @(negedge clk);
      in_base = AW'(ib); out_base = AW'(ob); cmd_init = do_init; cmd_start = 1'b1;
      @(negedge clk);
      cmd_start = 1'b0;
      while (!cmd_done) @(negedge clk);
      checks += 4;
      if (n_reads - r0 != NIN) begin failures++; $display("FAIL %0d reads", n_reads - r0); end
      if (n_writes - w0 != NOUT) begin failures++; $display("FAIL %0d writes", n_writes - w0); end
      if (compute_cyc > BUDGET) begin failures++; $display("FAIL compute %0d clocks", compute_cyc); end
      if (xfer_cyc > XFER_BUDGET) begin failures++; $display("FAIL transfer %0d clocks", xfer_cyc); end
      for (int i = 0; i < N; i++) begin
        check($sformatf("cmd %0d x[%0d]", c, i), fx2r(mem[ob + i][47:0]), xo[i][0]);
        check($sformatf("cmd %0d i[%0d]", c, i), fx2r(mem[ob + N + i][47:0]), iv[i][0]);
      end
      checks++;
      if (mem[ob + 2*N] != 64'd0) begin failures++; $display("FAIL status word %0h", mem[ob + 2*N]); end
      $display("command %0d: compute %0d clocks, transfer %0d clocks", c, compute_cyc, xfer_cyc);
    end
    checks += 6;
    if (n_init == 0)   begin failures++; $display("FAIL no initialising command"); end
    if (n_cont == 0)   begin failures++; $display("FAIL no continuing command"); end
    if (n_stalls == 0) begin failures++; $display("FAIL memory never stalled"); end
    if (n_inv2 == 0)   begin failures++; $display("FAIL 2x2 formula inverse never ran"); end
    if (n_gj == 0)     begin failures++; $display("FAIL Gauss-Jordan inverse never ran"); end
    if (n_swap == 0)   begin failures++; $display("FAIL no pivot row swap"); end
    $display("mechanisms: init %0d, continue %0d, memory stalls %0d, 2x2 inverses %0d, GJ inverses %0d, row swaps %0d",
             n_init, n_cont, n_stalls, n_inv2, n_gj, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CMDS * (BUDGET + 2000) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
