// gj_inverse: matrix inverse by Gauss-Jordan elimination.
//
// The n x n matrix (n <= MAXD) is loaded beside an identity matrix, forming
// the augmented matrix [A | I]. For each column in turn the unit
//   1. picks the row with the largest magnitude in that column, at or below
//      the diagonal, and swaps it onto the diagonal (row switch),
//   2. divides the pivot row by the pivot (row times a number), using one
//      reciprocal from the shared fx_div and a row of multipliers,
//   3. subtracts multiples of the pivot row from every other row, one row per
//      clock (adding two rows).
// When the left half has become the identity, the right half is A^-1.
// The three row operations are those of the Gauss-Jordan algorithm the
// filter IP uses for its inverses; choosing the largest pivot, and the one-row-
// per-clock schedule, are this design's choices. A zero pivot sets singular.
//
// Timing: start is taken while busy is low; a_in and n must hold for the
// clock of start only. Each column costs 1 (pivot) + 1 (divider start) +
// DW+FW+2 (divide) + 1 (scale) + n (eliminate) clocks, so done pulses
// 1 + n*(n+DW+FW+5) clocks after start; inv holds until the next start.
module gj_inverse #(
  parameter int unsigned MAXD = 4,
  parameter int unsigned DW   = 48,
  parameter int unsigned FW   = 24,
  localparam int unsigned IW  = $clog2(MAXD + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [IW-1:0]        n,
  input  logic signed [DW-1:0] a_in [MAXD][MAXD],
  output logic                 busy,
  output logic                 done,
  output logic                 singular,
  output logic signed [DW-1:0] inv  [MAXD][MAXD]
);
  typedef enum logic [2:0] {S_IDLE, S_PIVOT, S_DIV, S_WAIT, S_SCALE, S_ELIM} state_e;
  state_e st;

  logic signed [DW-1:0] m [MAXD][MAXD];   // left half, becomes identity
  logic [IW-1:0] col, row;
  logic [IW-1:0] n_q;

  function automatic logic signed [DW-1:0] fxm(input logic signed [DW-1:0] u,
                                               input logic signed [DW-1:0] v);
    logic signed [2*DW-1:0] p;
    p = u * v;
    return p[FW +: DW];
  endfunction

  function automatic logic [DW-1:0] mag(input logic signed [DW-1:0] u);
    return u[DW-1] ? DW'(-u) : DW'(u);
  endfunction

  // pivot search over rows col..n-1 of column col
  logic [IW-1:0] piv;
  logic [DW-1:0] piv_mag;
  always_comb begin
    piv     = col;
    piv_mag = '0;
    for (int i = 0; i < int'(MAXD); i++) begin
      if (i >= int'(col) && i < int'(n_q) && mag(m[i][col]) > piv_mag) begin
        piv     = IW'(i);
        piv_mag = mag(m[i][col]);
      end
    end
  end

  // reciprocal of the pivot
  logic                 div_start, div_busy, div_done, div_dbz;
  logic signed [DW-1:0] recip;
  fx_div #(.DW(DW), .FW(FW)) u_div (
    .clk, .rst_n, .start(div_start),
    .a(DW'(1) << FW), .b(m[col][col]),
    .busy(div_busy), .done(div_done), .q(recip), .dbz(div_dbz)
  );
  assign div_start = (st == S_DIV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; col <= '0; row <= '0; n_q <= '0;
      done <= 1'b0; singular <= 1'b0;
      for (int i = 0; i < int'(MAXD); i++)
        for (int j = 0; j < int'(MAXD); j++) begin
          m[i][j]   <= '0;
          inv[i][j] <= '0;
        end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          n_q      <= n;
          col      <= '0;
          singular <= 1'b0;
          for (int i = 0; i < int'(MAXD); i++)
            for (int j = 0; j < int'(MAXD); j++) begin
              m[i][j]   <= (i < int'(n) && j < int'(n)) ? a_in[i][j] : '0;
              inv[i][j] <= (i == j && i < int'(n)) ? (DW'(1) << FW) : '0;
            end
          st <= S_PIVOT;
        end
        S_PIVOT: begin
          if (piv_mag == '0) singular <= 1'b1;
          if (piv != col) begin
            m[col]   <= m[piv];
            m[piv]   <= m[col];
            inv[col] <= inv[piv];
            inv[piv] <= inv[col];
          end
          st <= S_DIV;
        end
        S_DIV:  st <= S_WAIT;
        S_WAIT: if (div_done) st <= S_SCALE;
        S_SCALE: begin
          for (int j = 0; j < int'(MAXD); j++) begin
            m[col][j]   <= fxm(m[col][j], recip);
            inv[col][j] <= fxm(inv[col][j], recip);
          end
          row <= '0;
          st  <= S_ELIM;
        end
        S_ELIM: begin
          if (row != col) begin
            for (int j = 0; j < int'(MAXD); j++) begin
              m[row][j]   <= m[row][j]   - fxm(m[row][col], m[col][j]);
              inv[row][j] <= inv[row][j] - fxm(m[row][col], inv[col][j]);
            end
          end
          if (row == n_q - 1'b1) begin
            if (col == n_q - 1'b1) begin
              done <= 1'b1;
              st   <= S_IDLE;
            end else begin
              col <= col + 1'b1;
              st  <= S_PIVOT;
            end
          end else begin
            row <= row + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // the divider's busy and divide-by-zero flags are covered by the pivot test
  logic unused;
  assign unused = div_busy ^ div_dbz;
endmodule
