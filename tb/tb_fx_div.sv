// tb_fx_div: self-checking test of the fixed-point divider (48-bit words,
// 24 fraction bits). Random signed operands are checked against integer
// division of the scaled dividend, truncated toward zero; saturation and
// division by zero are checked once each, and every divide must finish in
// exactly DW+FW+2 clocks.
module tb_fx_div;
  localparam int DW = 48, FW = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic signed [DW-1:0] a = '0, b = '0, q;
  logic busy, done, dbz;

  fx_div u_dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .q, .dbz);

  int checks = 0, failures = 0;

  task automatic run(input longint av, input longint bv, input longint exp, input bit exp_dbz);
    int cyc;
    @(negedge clk);
    a = DW'(av); b = DW'(bv); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 500) begin @(negedge clk); cyc++; end
    checks += 3;
    if (longint'(q) != exp) begin
      failures++; $display("FAIL %0d / %0d: got %0d expected %0d", av, bv, longint'(q), exp);
    end
    if (dbz != exp_dbz) begin failures++; $display("FAIL dbz for %0d / %0d", av, bv); end
    if (cyc != DW + FW + 2) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      longint av, bv;
      av = longint'($urandom) * ((i % 3 == 0) ? 64 : 1) - 64'sd2147483648;
      bv = longint'($urandom % 400000000) - 64'sd200000000;
      if (bv == 0) bv = 7;
      run(av, bv, (av * (64'sd1 << FW)) / bv, 1'b0);
    end
    run(64'sd1 << FW, 64'sd1 << FW, 64'sd1 << FW, 1'b0);               // 1 / 1
    run(-(64'sd3 << FW), 64'sd1 << (FW - 1), -(64'sd6 << FW), 1'b0);    // -3 / 0.5
    run(64'sd1 << 44, 64'sd1, (64'sd1 << (DW - 1)) - 1, 1'b0);          // saturates
    run(64'sd5 << FW, 0, (64'sd1 << (DW - 1)) - 1, 1'b1);               // divide by zero
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
