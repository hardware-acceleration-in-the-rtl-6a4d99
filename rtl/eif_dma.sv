// eif_dma: block mover between shared memory and the filter IP.
//
// Instead of the processor copying every input of the filter into the IP,
// the mover reads the whole input block of one iteration straight from
// shared memory, starts the filter, and writes the results back, so the
// processor only writes the block and one command. The filter can start only
// when all its inputs are present, so the block is read in full first.
//
// Memory layout, one value per 64-bit word (the low DW bits, sign-extended
// on write), starting at in_base:
//   step_t | q_diag[N/2] | r_diag[M] | h_var[M] | y[M] | init_vec[N] | init_diag[N]
// and at out_base the results: x_out[N] | info_vec[N] | status word (bit 0:
// singular). Addresses count 64-bit words.
//
// The memory port is a simple request/grant port with in-order read data:
// a request is accepted in a clock where mem_req and mem_gnt are both high;
// read data returns on mem_rvalid any number of clocks later. The mover keeps
// one request in flight. Direct transfer from shared memory follows the
// filter IP's zero-copy data path; the port protocol, the word layout and the
// one-request schedule are this design's choices (a bus adapter would map
// the port onto AXI).
//
// Command timing: cmd_start is taken while cmd_busy is low, together with
// in_base, out_base and cmd_init (reinitialise the filter). cmd_done pulses
// for one clock after the last result word has been accepted.
module eif_dma
  import eif_pkg::*;
#(
  parameter int unsigned N  = eif_pkg::N_STATES,
  parameter int unsigned M  = eif_pkg::N_SENS,
  parameter int unsigned DW = eif_pkg::DW_DEF,
  parameter int unsigned AW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 cmd_start,
  input  logic                 cmd_init,
  input  logic [AW-1:0]        in_base,
  input  logic [AW-1:0]        out_base,
  output logic                 cmd_busy,
  output logic                 cmd_done,
  // shared-memory port
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_addr,
  output logic [63:0]          mem_wdata,
  input  logic                 mem_gnt,
  input  logic                 mem_rvalid,
  input  logic [63:0]          mem_rdata,
  // filter IP
  output logic                 f_start,
  output logic                 f_init,
  output logic signed [DW-1:0] f_step_t,
  output logic signed [DW-1:0] f_q_diag    [N/2],
  output logic signed [DW-1:0] f_r_diag    [M],
  output logic signed [DW-1:0] f_h_var     [M],
  output logic signed [DW-1:0] f_y         [M],
  output logic signed [DW-1:0] f_init_vec  [N],
  output logic signed [DW-1:0] f_init_diag [N],
  input  logic                 f_busy,
  input  logic                 f_done,
  input  logic                 f_singular,
  input  logic signed [DW-1:0] f_x_out     [N],
  input  logic signed [DW-1:0] f_info_vec  [N]
);
  localparam int unsigned NIN  = 1 + N/2 + 3*M + 2*N;   // input words
  localparam int unsigned NOUT = 2*N + 1;               // output words
  localparam int unsigned CW   = $clog2(NIN + 1);

  typedef enum logic [2:0] {D_IDLE, D_RREQ, D_RDATA, D_RUN, D_WAIT, D_WREQ, D_DONE} dstate_e;
  dstate_e st;

  logic signed [DW-1:0] inbuf [NIN];
  logic [CW-1:0] idx;
  logic [AW-1:0] in_b, out_b;
  logic          init_q;
  logic          sing_q;

  // unpack the input buffer into the filter's ports
  always_comb begin
    f_step_t = inbuf[0];
    for (int i = 0; i < int'(N/2); i++) f_q_diag[i]    = inbuf[1 + i];
    for (int i = 0; i < int'(M); i++)   f_r_diag[i]    = inbuf[1 + N/2 + i];
    for (int i = 0; i < int'(M); i++)   f_h_var[i]     = inbuf[1 + N/2 + M + i];
    for (int i = 0; i < int'(M); i++)   f_y[i]         = inbuf[1 + N/2 + 2*M + i];
    for (int i = 0; i < int'(N); i++)   f_init_vec[i]  = inbuf[1 + N/2 + 3*M + i];
    for (int i = 0; i < int'(N); i++)   f_init_diag[i] = inbuf[1 + N/2 + 3*M + N + i];
  end

  // the result word at output index idx
  logic signed [DW-1:0] res;
  always_comb begin
    if (idx < CW'(N))          res = f_x_out[idx];
    else if (idx < CW'(2 * N)) res = f_info_vec[idx - CW'(N)];
    else                       res = DW'(sing_q);
  end

  assign mem_req   = (st == D_RREQ) || (st == D_WREQ);
  assign mem_we    = (st == D_WREQ);
  assign mem_addr  = (st == D_WREQ) ? out_b + AW'(idx) : in_b + AW'(idx);
  assign mem_wdata = 64'(res);          // sign-extended
  assign f_start   = (st == D_RUN);
  assign f_init    = init_q;
  assign cmd_busy  = (st != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; idx <= '0; in_b <= '0; out_b <= '0; init_q <= 1'b0;
      sing_q <= 1'b0; cmd_done <= 1'b0;
      for (int i = 0; i < int'(NIN); i++) inbuf[i] <= '0;
    end else begin
      cmd_done <= 1'b0;
      unique case (st)
        D_IDLE: if (cmd_start) begin
          in_b   <= in_base;
          out_b  <= out_base;
          init_q <= cmd_init;
          idx    <= '0;
          st     <= D_RREQ;
        end
        D_RREQ:  if (mem_gnt) st <= D_RDATA;
        D_RDATA: if (mem_rvalid) begin
          inbuf[idx] <= mem_rdata[DW-1:0];
          if (idx == CW'(NIN - 1)) st <= D_RUN;
          else begin
            idx <= idx + 1'b1;
            st  <= D_RREQ;
          end
        end
        D_RUN:  if (!f_busy) st <= D_WAIT;      // f_start is high in this state
        D_WAIT: if (f_done) begin
          sing_q <= f_singular;
          idx    <= '0;
          st     <= D_WREQ;
        end
        D_WREQ: if (mem_gnt) begin
          if (idx == CW'(NOUT - 1)) st <= D_DONE;
          else idx <= idx + 1'b1;
        end
        D_DONE: begin
          cmd_done <= 1'b1;
          st       <= D_IDLE;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  // a read response is expected only while a read is outstanding
  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> st == D_RDATA);
endmodule
