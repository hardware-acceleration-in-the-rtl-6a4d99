// mat_mul: fixed-point matrix multiplier, C = op(A) * op(B).
//
// op(A) is A or its transpose (ta), likewise op(B) (tb); op(A) is rows x inner
// and op(B) is inner x cols, all at most MAXD. The inner loop is unrolled:
// MAXD multipliers form one dot product per clock, so C appears one element
// per clock in row-major order on the wr_* stream. Products are summed at full
// precision and shifted right by FW once, truncating toward minus infinity.
// Unrolling the inner loop follows the loop-unrolling optimisation of the
// filter IP; one element per clock, and summing before rounding, are this
// design's choices.
//
// Timing: start is taken while busy is low; A, B and the sizes must hold until
// done. After start the elements follow one per clock; the one-clock done
// pulse comes with the last element, rows*cols+1 clocks after the clock of
// start.
module mat_mul #(
  parameter int unsigned MAXD = 13,
  parameter int unsigned DW   = 48,
  parameter int unsigned FW   = 24,
  localparam int unsigned IW  = $clog2(MAXD + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [IW-1:0]        rows,
  input  logic [IW-1:0]        cols,
  input  logic [IW-1:0]        inner,
  input  logic                 ta,
  input  logic                 tb,
  input  logic signed [DW-1:0] a [MAXD][MAXD],
  input  logic signed [DW-1:0] b [MAXD][MAXD],
  output logic                 busy,
  output logic                 wr_en,
  output logic [IW-1:0]        wr_row,
  output logic [IW-1:0]        wr_col,
  output logic signed [DW-1:0] wr_data,
  output logic                 done
);
  localparam int unsigned AW = 2 * DW + IW;   // accumulator width

  logic [IW-1:0] r, c;
  logic          run;

  // one dot product of row r of op(A) and column c of op(B)
  logic signed [AW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(MAXD); k++) begin
      logic signed [DW-1:0] av, bv;
      av = ta ? a[k][r] : a[r][k];
      bv = tb ? b[c][k] : b[k][c];
      if (k < int'(inner)) acc = acc + AW'(av * bv);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; r <= '0; c <= '0;
      wr_en <= 1'b0; wr_row <= '0; wr_col <= '0; wr_data <= '0; done <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      done  <= 1'b0;
      if (start && !run) begin
        run <= 1'b1;
        r   <= '0;
        c   <= '0;
      end else if (run) begin
        wr_en   <= 1'b1;
        wr_row  <= r;
        wr_col  <= c;
        wr_data <= acc[FW +: DW];
        if (c == cols - 1'b1) begin
          c <= '0;
          if (r == rows - 1'b1) begin
            run  <= 1'b0;
            done <= 1'b1;
          end else begin
            r <= r + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  assign busy = run;
endmodule
