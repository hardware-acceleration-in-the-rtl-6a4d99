// eif_accel: the filter accelerator as it sits beside the processor.
//
// The processor places the input block of an iteration in shared memory and
// issues one command; the block mover (eif_dma) fetches the block, runs one
// iteration of the extended information filter (eif_filter: prediction and
// measurement update), and writes the state estimate, the new information
// vector and a status word back to shared memory. The filter keeps its
// information vector and matrix between commands, so consecutive commands
// run consecutive filter iterations; cmd_init restarts it from the
// initialisation vectors in the block.
//
// Ports: the command port and the shared-memory port of eif_dma (see there
// for the block layout and the request/grant protocol). For the default four
// states and 13 sensors a command reads 50 words, computes for about 1,020
// clocks and writes 9 words.
module eif_accel
  import eif_pkg::*;
#(
  parameter int unsigned N  = eif_pkg::N_STATES,
  parameter int unsigned M  = eif_pkg::N_SENS,
  parameter int unsigned DW = eif_pkg::DW_DEF,
  parameter int unsigned FW = eif_pkg::FW_DEF,
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_start,
  input  logic          cmd_init,
  input  logic [AW-1:0] in_base,
  input  logic [AW-1:0] out_base,
  output logic          cmd_busy,
  output logic          cmd_done,
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [63:0]   mem_wdata,
  input  logic          mem_gnt,
  input  logic          mem_rvalid,
  input  logic [63:0]   mem_rdata
);
  logic                 f_start, f_init, f_busy, f_done, f_singular;
  logic signed [DW-1:0] f_step_t;
  logic signed [DW-1:0] f_q_diag    [N/2];
  logic signed [DW-1:0] f_r_diag    [M];
  logic signed [DW-1:0] f_h_var     [M];
  logic signed [DW-1:0] f_y         [M];
  logic signed [DW-1:0] f_init_vec  [N];
  logic signed [DW-1:0] f_init_diag [N];
  logic signed [DW-1:0] f_x_out     [N];
  logic signed [DW-1:0] f_info_vec  [N];

  eif_dma #(.N(N), .M(M), .DW(DW), .AW(AW)) u_dma (
    .clk, .rst_n,
    .cmd_start, .cmd_init, .in_base, .out_base, .cmd_busy, .cmd_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .f_start, .f_init, .f_step_t, .f_q_diag, .f_r_diag, .f_h_var, .f_y,
    .f_init_vec, .f_init_diag, .f_busy, .f_done, .f_singular, .f_x_out, .f_info_vec
  );

  eif_filter #(.N(N), .M(M), .DW(DW), .FW(FW)) u_filter (
    .clk, .rst_n,
    .start(f_start), .filt_init(f_init), .step_t(f_step_t), .q_diag(f_q_diag),
    .r_diag(f_r_diag), .h_var(f_h_var), .y(f_y), .init_vec(f_init_vec),
    .init_diag(f_init_diag), .busy(f_busy), .done(f_done), .singular(f_singular),
    .x_out(f_x_out), .info_vec(f_info_vec)
  );
endmodule
