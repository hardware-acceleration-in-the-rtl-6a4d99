// inv2x2: inverse of a 2 x 2 matrix by the analytic formula
//
//   [a b; c d]^-1 = 1/(a*d - b*c) * [d -b; -c a].
//
// The four-state filter has two 2 x 2 inverses per iteration (the process
// noise matrix Q and the matrix G^T I_h G + Q^-1); the formula replaces a
// full Gauss-Jordan pass for them, as in the filter IP. The determinant is
// formed in the clock of start, its reciprocal by fx_div, and the four
// products in the clock after the divide. Handling an asymmetric input is this
// design's choice (the inputs used by the filter are symmetric).
//
// Timing: start is taken while busy is low; a_in must hold for the clock of
// start only. done pulses DW+FW+5 clocks after start, with inv valid until the
// next start. singular is set when the determinant is zero.
module inv2x2 #(
  parameter int unsigned DW = 48,
  parameter int unsigned FW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] a_in [2][2],
  output logic                 busy,
  output logic                 done,
  output logic                 singular,
  output logic signed [DW-1:0] inv  [2][2]
);
  function automatic logic signed [DW-1:0] fxm(input logic signed [DW-1:0] u,
                                               input logic signed [DW-1:0] v);
    logic signed [2*DW-1:0] p;
    p = u * v;
    return p[FW +: DW];
  endfunction

  logic signed [DW-1:0] m [2][2];   // latched input
  logic signed [DW-1:0] det;
  logic                 div_start, div_busy, div_done, div_dbz;
  logic signed [DW-1:0] recip;
  logic                 run, pend;

  fx_div #(.DW(DW), .FW(FW)) u_div (
    .clk, .rst_n, .start(div_start),
    .a(DW'(1) << FW), .b(det),
    .busy(div_busy), .done(div_done), .q(recip), .dbz(div_dbz)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; pend <= 1'b0; done <= 1'b0; singular <= 1'b0; det <= '0;
      div_start <= 1'b0;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          m[i][j] <= '0; inv[i][j] <= '0;
        end
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      if (start && !run) begin
        m         <= a_in;
        det       <= fxm(a_in[0][0], a_in[1][1]) - fxm(a_in[0][1], a_in[1][0]);
        div_start <= 1'b1;
        run       <= 1'b1;
        pend      <= 1'b0;
      end else if (run && div_done) begin
        singular  <= div_dbz;
        pend      <= 1'b1;
        run       <= 1'b0;
      end else if (pend) begin
        pend      <= 1'b0;
        inv[0][0] <= fxm( m[1][1], recip);
        inv[0][1] <= fxm(-m[0][1], recip);
        inv[1][0] <= fxm(-m[1][0], recip);
        inv[1][1] <= fxm( m[0][0], recip);
        done      <= 1'b1;
      end
    end
  end

  assign busy = run | pend;

  logic unused;
  assign unused = div_busy;
endmodule
