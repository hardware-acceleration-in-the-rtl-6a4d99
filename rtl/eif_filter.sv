// eif_filter: extended information filter IP, one prediction and one
// measurement update per start.
//
// The filter keeps an N-element information vector i and an N x N
// information matrix I between iterations. With filt_init set at start they
// are first loaded from the initialisation vectors (i = init_vec,
// I = diag(init_diag)); otherwise the values of the previous iteration are
// used. One iteration then computes
//   i_h = F^-1 i                     I_h = F^-T I F^-1
//   X   = I_h G (G^T I_h G + Q^-1)^-1 G^T
//   i_p = i_h - X i_h                I_p = I_h - X I_h
//   P   = I_p^-1                     x   = P i_p        (state output)
//   i   = i_p + H^T R y              I   = I_p + H^T R H
// with F, G, Q, H and R formed from the step time T, the noise vectors and
// the sensor values:
//   F (N x N)     blocks [1 T 0 0; 0 1 0 0; 0 0 1 T; 0 0 0 1]
//   G (N x N/2)   blocks [T/2 0; 0 0; 0 T/2; 0 T]
//   Q, R          diagonal, from q_diag and r_diag
//   H (M x N)     the 13 x 4 pattern below, h_var[row] in the entries marked S
//     row: columns 0..3   0: 0 1 0 0   1: 0 0 0 0   2: 0 0 1 S   3: 1 0 0 1
//     4: 0 0 0 0   5: 0 0 0 0   6: 1 0 S 1   7: 1 0 S 1   8: 1 0 S 0
//     9: 1 0 S 0  10: 0 0 1 0  11: 1 0 0 1  12: 1 0 0 1
// The 4-state patterns are those of the four-state filter; repeating them
// for N = 8 and 16 is this design's extension. The equations, the matrix
// patterns and the four inverses per iteration (two N x N, two N/2 x N/2)
// follow the filter this IP implements. The measurement model h(x) of the
// extended filter is taken as its linear part H x, so the innovation term
// y - h(x) + H x reduces to y; that, the fixed-point number format and the
// schedule are this design's choices.
//
// How it works: all matrices live in a register file of NSLOT slots of
// MAXD x MAXD words. A phase sequencer steps through the equations; each
// phase starts one shared unit: mat_mul (one result element per clock, with
// an optional fused add or subtract of another slot), gj_inverse (reused for
// both N x N inverses) or, for the N/2 x N/2 inverses, inv2x2 when N = 4 and
// gj_inverse otherwise.
//
// Interface and timing: inputs are sampled in the clock where start is taken
// (busy low). busy stays high through the iteration; done pulses for one
// clock when x_out and info_vec are valid, and they hold until the next done.
// For N = 4 an iteration takes about 1,050 clocks. singular reports a zero
// pivot or determinant in any inverse of the last iteration.
module eif_filter
  import eif_pkg::*;
#(
  parameter int unsigned N  = eif_pkg::N_STATES,
  parameter int unsigned M  = eif_pkg::N_SENS,
  parameter int unsigned DW = eif_pkg::DW_DEF,
  parameter int unsigned FW = eif_pkg::FW_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 filt_init,
  input  logic signed [DW-1:0] step_t,
  input  logic signed [DW-1:0] q_diag    [N/2],
  input  logic signed [DW-1:0] r_diag    [M],
  input  logic signed [DW-1:0] h_var     [M],
  input  logic signed [DW-1:0] y         [M],
  input  logic signed [DW-1:0] init_vec  [N],
  input  logic signed [DW-1:0] init_diag [N],
  output logic                 busy,
  output logic                 done,
  output logic                 singular,
  output logic signed [DW-1:0] x_out     [N],
  output logic signed [DW-1:0] info_vec  [N]
);
  localparam int unsigned MAXD = (N > M) ? N : M;
  localparam int unsigned IW   = $clog2(MAXD + 1);
  localparam int unsigned H2   = N / 2;
  localparam int unsigned NW   = $clog2(N + 1);
  localparam logic signed [DW-1:0] ONE = DW'(1) << FW;

  typedef enum logic [4:0] {
    SL_F, SL_G, SL_Q, SL_H, SL_R, SL_Y, SL_FI, SL_QI, SL_I, SL_IV, SL_IH,
    SL_IHV, SL_T1, SL_T2, SL_A, SL_AI, SL_T3, SL_X, SL_IPV, SL_IP, SL_P,
    SL_XO, SL_RH, SL_RY
  } slot_e;
  localparam int unsigned NSLOT = 24;

  typedef enum logic [1:0] {K_MUL, K_INVN, K_INVH} kind_e;
  typedef enum logic [1:0] {P_NONE, P_PLUS, P_MINUS} post_e;

  typedef struct packed {
    kind_e         kind;
    slot_e         dst, sa, sb, sc;   // result, operands, fused add/sub term
    logic          ta, tb;
    logic [IW-1:0] rows, cols, inner;
    post_e         post;
  } op_t;

  // the operation performed in each phase
  function automatic op_t op_of(input phase_e ph);
    op_t o;
    o = '{kind: K_MUL, dst: SL_T1, sa: SL_F, sb: SL_F, sc: SL_F, ta: 1'b0,
          tb: 1'b0, rows: IW'(N), cols: IW'(N), inner: IW'(N), post: P_NONE};
    unique case (ph)
      PH_FINV:   begin o.kind = K_INVN; o.sa = SL_F;  o.dst = SL_FI; end
      PH_QINV:   begin o.kind = K_INVH; o.sa = SL_Q;  o.dst = SL_QI; end
      PH_IH_VEC: begin o.dst = SL_IHV; o.sa = SL_FI; o.sb = SL_IV; o.cols = IW'(1); end
      PH_T1:     begin o.dst = SL_T1;  o.sa = SL_I;  o.sb = SL_FI; end
      PH_IH_MAT: begin o.dst = SL_IH;  o.sa = SL_FI; o.sb = SL_T1; o.ta = 1'b1; end
      PH_T2:     begin o.dst = SL_T2;  o.sa = SL_IH; o.sb = SL_G;  o.cols = IW'(H2); end
      PH_A:      begin o.dst = SL_A;   o.sa = SL_G;  o.sb = SL_T2; o.ta = 1'b1;
                       o.rows = IW'(H2); o.cols = IW'(H2); o.post = P_PLUS; o.sc = SL_QI; end
      PH_AINV:   begin o.kind = K_INVH; o.sa = SL_A; o.dst = SL_AI; end
      PH_T3:     begin o.dst = SL_T3;  o.sa = SL_T2; o.sb = SL_AI;
                       o.cols = IW'(H2); o.inner = IW'(H2); end
      PH_X:      begin o.dst = SL_X;   o.sa = SL_T3; o.sb = SL_G;  o.tb = 1'b1;
                       o.inner = IW'(H2); end
      PH_IP_VEC: begin o.dst = SL_IPV; o.sa = SL_X;  o.sb = SL_IHV; o.cols = IW'(1);
                       o.post = P_MINUS; o.sc = SL_IHV; end
      PH_IP_MAT: begin o.dst = SL_IP;  o.sa = SL_X;  o.sb = SL_IH;
                       o.post = P_MINUS; o.sc = SL_IH; end
      PH_PINV:   begin o.kind = K_INVN; o.sa = SL_IP; o.dst = SL_P; end
      PH_XOUT:   begin o.dst = SL_XO;  o.sa = SL_P;  o.sb = SL_IPV; o.cols = IW'(1); end
      PH_RH:     begin o.dst = SL_RH;  o.sa = SL_R;  o.sb = SL_H;
                       o.rows = IW'(M); o.inner = IW'(M); end
      PH_RY:     begin o.dst = SL_RY;  o.sa = SL_R;  o.sb = SL_Y;
                       o.rows = IW'(M); o.cols = IW'(1); o.inner = IW'(M); end
      PH_IU_VEC: begin o.dst = SL_IV;  o.sa = SL_H;  o.sb = SL_RY; o.ta = 1'b1;
                       o.cols = IW'(1); o.inner = IW'(M); o.post = P_PLUS; o.sc = SL_IPV; end
      PH_IU_MAT: begin o.dst = SL_I;   o.sa = SL_H;  o.sb = SL_RH; o.ta = 1'b1;
                       o.inner = IW'(M); o.post = P_PLUS; o.sc = SL_IP; end
      default: ;
    endcase
    return o;
  endfunction

  // ---------------------------------------------------------------- storage
  logic signed [DW-1:0] mem [NSLOT][MAXD][MAXD];

  phase_e ph;
  logic   issued;
  op_t    op;
  assign op = op_of(ph);

  // ------------------------------------------------------- matrix formation
  logic signed [DW-1:0] f_m [N][N];
  logic signed [DW-1:0] g_m [N][H2];
  logic signed [DW-1:0] q_m [H2][H2];
  logic signed [DW-1:0] h_m [M][N];
  logic signed [DW-1:0] r_m [M][M];

  // F and G repeat the 4-state blocks along the diagonal for N = 8, 16;
  // H repeats its 13 x 4 pattern for every group of four columns.
  // H pattern codes: 0 -> 0, 1 -> 1, 2 -> h_var[row]; row r, column c at [r][c]
  typedef logic [1:0] hcode_t [13][4];
  localparam hcode_t HPAT = '{
    '{0, 1, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 1, 2}, '{1, 0, 0, 1},
    '{0, 0, 0, 0}, '{0, 0, 0, 0}, '{1, 0, 2, 1}, '{1, 0, 2, 1},
    '{1, 0, 2, 0}, '{1, 0, 2, 0}, '{0, 0, 1, 0}, '{1, 0, 0, 1},
    '{1, 0, 0, 1}
  };

  logic signed [DW-1:0] half_t;
  assign half_t = step_t >>> 1;

  always_comb begin
    // F: identity plus T on the (4g, 4g+1) and (4g+2, 4g+3) entries
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        if (i == j)                              f_m[i][j] = ONE;
        else if (j == i + 1 && (i % 2) == 0)     f_m[i][j] = step_t;
        else                                     f_m[i][j] = '0;
      end
    // G: per 4-state group g, column 2g gets T/2 at row 4g, column 2g+1
    // gets T/2 at row 4g+2 and T at row 4g+3
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N/2); j++) begin
        g_m[i][j] = '0;
        if (i / 4 == j / 2) begin
          if ((j % 2) == 0 && (i % 4) == 0) g_m[i][j] = half_t;
          if ((j % 2) == 1 && (i % 4) == 2) g_m[i][j] = half_t;
          if ((j % 2) == 1 && (i % 4) == 3) g_m[i][j] = step_t;
        end
      end
    for (int i = 0; i < int'(N/2); i++)
      for (int j = 0; j < int'(N/2); j++)
        q_m[i][j] = (i == j) ? q_diag[i] : '0;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++) begin
        unique case (HPAT[i % 13][j % 4])
          2'd1:    h_m[i][j] = ONE;
          2'd2:    h_m[i][j] = h_var[i];
          default: h_m[i][j] = '0;
        endcase
      end
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(M); j++)
        r_m[i][j] = (i == j) ? r_diag[i] : '0;
  end

  initial begin
    assert (N % 4 == 0) else $error("eif_filter: N must be a multiple of 4");
  end

  // --------------------------------------------------------- matrix multiply
  logic                 mm_start, mm_busy, mm_wr, mm_done;
  logic [IW-1:0]        mm_row, mm_col;
  logic signed [DW-1:0] mm_data;

  mat_mul #(.MAXD(MAXD), .DW(DW), .FW(FW)) u_mul (
    .clk, .rst_n, .start(mm_start),
    .rows(op.rows), .cols(op.cols), .inner(op.inner), .ta(op.ta), .tb(op.tb),
    .a(mem[op.sa]), .b(mem[op.sb]),
    .busy(mm_busy), .wr_en(mm_wr), .wr_row(mm_row), .wr_col(mm_col),
    .wr_data(mm_data), .done(mm_done)
  );
  assign mm_start = (op.kind == K_MUL) && !issued && busy;

  // ------------------------------------------------------ N x N inverse unit
  logic                 gn_start, gn_busy, gn_done, gn_sing;
  logic [NW-1:0]        gn_n;
  logic signed [DW-1:0] gn_in  [N][N];
  logic signed [DW-1:0] gn_out [N][N];
  logic                 use_gj_half;

  always_comb
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++)
        gn_in[i][j] = mem[op.sa][i][j];

  gj_inverse #(.MAXD(N), .DW(DW), .FW(FW)) u_gj (
    .clk, .rst_n, .start(gn_start), .n(gn_n), .a_in(gn_in),
    .busy(gn_busy), .done(gn_done), .singular(gn_sing), .inv(gn_out)
  );
  assign gn_n     = (op.kind == K_INVN) ? NW'(N) : NW'(H2);
  assign gn_start = ((op.kind == K_INVN) || (op.kind == K_INVH && use_gj_half))
                    && !issued && busy;

  // ----------------------------------------------- N/2 x N/2 inverse unit
  logic                 hv_done, hv_sing;
  logic signed [DW-1:0] hv_out [H2][H2];

  if (H2 == 2) begin : g_formula
    logic                 f_busy;
    logic signed [DW-1:0] f_in [2][2];
    always_comb
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++)
          f_in[i][j] = mem[op.sa][i][j];
    inv2x2 #(.DW(DW), .FW(FW)) u_inv2 (
      .clk, .rst_n, .start((op.kind == K_INVH) && !issued && busy), .a_in(f_in),
      .busy(f_busy), .done(hv_done), .singular(hv_sing), .inv(hv_out)
    );
    assign use_gj_half = 1'b0;
    logic unused_busy;
    assign unused_busy = f_busy;
  end else begin : g_shared
    // the N/2 inverses reuse the Gauss-Jordan unit
    assign use_gj_half = 1'b1;
    assign hv_done     = 1'b0;
    assign hv_sing     = 1'b0;
    always_comb
      for (int i = 0; i < int'(H2); i++)
        for (int j = 0; j < int'(H2); j++)
          hv_out[i][j] = gn_out[i][j];
  end

  // ----------------------------------------------------------- sequencer
  logic step_done;
  always_comb begin
    unique case (op.kind)
      K_MUL:   step_done = mm_done;
      K_INVN:  step_done = gn_done;
      default: step_done = use_gj_half ? gn_done : hv_done;
    endcase
  end

  assign busy = (ph != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= PH_IDLE; issued <= 1'b0; done <= 1'b0; singular <= 1'b0;
      for (int s = 0; s < int'(NSLOT); s++)
        for (int i = 0; i < int'(MAXD); i++)
          for (int j = 0; j < int'(MAXD); j++)
            mem[s][i][j] <= '0;
      for (int i = 0; i < int'(N); i++) begin
        x_out[i]    <= '0;
        info_vec[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (ph == PH_IDLE) begin
        if (start) begin
          // form the matrices of this iteration (and initialise on request)
          for (int i = 0; i < int'(MAXD); i++)
            for (int j = 0; j < int'(MAXD); j++) begin
              mem[SL_F][i][j] <= (i < int'(N) && j < int'(N))  ? f_m[i][j] : '0;
              mem[SL_G][i][j] <= (i < int'(N) && j < int'(H2)) ? g_m[i][j] : '0;
              mem[SL_Q][i][j] <= (i < int'(H2) && j < int'(H2)) ? q_m[i][j] : '0;
              mem[SL_H][i][j] <= (i < int'(M) && j < int'(N))  ? h_m[i][j] : '0;
              mem[SL_R][i][j] <= (i < int'(M) && j < int'(M))  ? r_m[i][j] : '0;
              mem[SL_Y][i][j] <= (i < int'(M) && j == 0)       ? y[i]      : '0;
              if (filt_init) begin
                mem[SL_IV][i][j] <= (i < int'(N) && j == 0) ? init_vec[i] : '0;
                mem[SL_I][i][j]  <= (i < int'(N) && i == j) ? init_diag[i] : '0;
              end
            end
          singular <= 1'b0;
          issued   <= 1'b0;
          ph       <= PH_FINV;
        end
      end else begin
        issued <= 1'b1;
        // results of the matrix multiplier, with the fused add or subtract
        if (mm_wr) begin
          unique case (op.post)
            P_PLUS:  mem[op.dst][mm_row][mm_col] <= mem[op.sc][mm_row][mm_col] + mm_data;
            P_MINUS: mem[op.dst][mm_row][mm_col] <= mem[op.sc][mm_row][mm_col] - mm_data;
            default: mem[op.dst][mm_row][mm_col] <= mm_data;
          endcase
        end
        if (step_done) begin
          if (op.kind == K_INVN || (op.kind == K_INVH && use_gj_half)) begin
            for (int i = 0; i < int'(N); i++)
              for (int j = 0; j < int'(N); j++)
                mem[op.dst][i][j] <= gn_out[i][j];
            if (gn_sing) singular <= 1'b1;
          end else if (op.kind == K_INVH) begin
            for (int i = 0; i < int'(H2); i++)
              for (int j = 0; j < int'(H2); j++)
                mem[op.dst][i][j] <= hv_out[i][j];
            if (hv_sing) singular <= 1'b1;
          end
          issued <= 1'b0;
          if (ph == PH_IU_MAT) begin
            ph   <= PH_IDLE;
            done <= 1'b1;
            for (int i = 0; i < int'(N); i++) begin
              x_out[i]    <= mem[SL_XO][i][0];
              info_vec[i] <= mem[SL_IV][i][0];
            end
          end else begin
            ph <= phase_e'(ph + 1'b1);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ checks
  // one unit at a time: a new unit is started only when the previous one is idle
  assert property (@(posedge clk) disable iff (!rst_n)
                   mm_start |-> !gn_busy && !mm_busy);
  assert property (@(posedge clk) disable iff (!rst_n)
                   gn_start |-> !gn_busy && !mm_busy);
endmodule
