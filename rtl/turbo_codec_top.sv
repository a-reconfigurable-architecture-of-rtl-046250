// turbo_codec_top: channel-coding core for MIMO-HSDPA: a rate-1/3 turbo
// encoder, an iterative max-log-MAP turbo decoder and a hybrid last-level
// cache, side by side.
//
// The encoder turns blocks of 40..K_MAX information bits into a serial
// stream S, P1, P2, S, P1, P2, ... (three bits per information bit); the decoder takes the channel LLRs of such a block and
// returns the decoded bits after a programmable number of iterations. The
// hybrid last-level cache serves read requests to a next memory level and keeps
// recurrently missed blocks in a retention store. The published design places the
// cache in the decoding system to relieve memory bandwidth but does not say
// which accesses go through it, so its request and memory ports are brought
// out unchanged; encoder and decoder ports are also brought out as they are,
// the channel lying between them. The block-size limit defaults to the
// published maximum (K_MAX = 5114); the other sizes are this design's choices.
//
// Interface and timing: see turbo_encoder, output_switch, turbo_decoder and
// hybrid_llc; the ports keep those modules' names with enc_, dec_ and llc_
// prefixes. enc_data_valid/enc_data_out/enc_data_last/enc_data_ready are the
// serial output of the output switch, one bit per clock while ready is high.
module turbo_codec_top
  import turbo_pkg::*;
#(
  parameter int unsigned K_MAX      = 5114,
  parameter int unsigned W          = 32,
  parameter int unsigned ROWS       = 20,
  parameter int unsigned LLC_ADDR_W = 16,
  parameter int unsigned LLC_DATA_W = 32,
  parameter int unsigned LLC_SETS   = 64,
  parameter int unsigned LLC_NRET   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // Turbo encoder.
  input  logic        enc_start,
  input  kidx_t       enc_k_len,
  input  logic        enc_in_valid,
  input  logic        enc_in_bit,
  output logic        enc_in_ready,
  output logic        enc_data_valid,
  output logic        enc_data_out,
  output logic        enc_data_last,
  input  logic        enc_data_ready,
  output logic        enc_busy,
  // Turbo decoder.
  input  logic        dec_start,
  input  kidx_t       dec_k_len,
  input  logic [3:0]  dec_n_iter,
  input  logic        dec_in_valid,
  input  llr_t        dec_in_sys,
  input  llr_t        dec_in_p1,
  input  llr_t        dec_in_p2,
  output logic        dec_in_ready,
  output logic        dec_out_valid,
  output kidx_t       dec_out_idx,
  output logic        dec_out_bit,
  output logic signed [BR_W:0] dec_out_llr,
  output logic        dec_out_last,
  output logic        dec_busy,
  output logic [3:0]  dec_iter_count,
  // Hybrid last-level cache.
  input  logic                  llc_req_valid,
  input  logic [LLC_ADDR_W-1:0] llc_req_addr,
  output logic                  llc_req_ready,
  output logic                  llc_resp_valid,
  output logic [LLC_DATA_W-1:0] llc_resp_data,
  output logic                  llc_resp_hit_main,
  output logic                  llc_resp_hit_ret,
  output logic                  llc_mem_req_valid,
  output logic [LLC_ADDR_W-1:0] llc_mem_req_addr,
  input  logic                  llc_mem_req_ready,
  input  logic                  llc_mem_resp_valid,
  input  logic [LLC_DATA_W-1:0] llc_mem_resp_data,
  output logic [15:0]           llc_n_retained
);

  logic tri_valid, tri_ready, tri_sys, tri_p1, tri_p2, tri_last;

  turbo_encoder #(.K_MAX(K_MAX), .ROWS(ROWS)) u_enc (
    .clk, .rst_n,
    .start(enc_start), .k_len(enc_k_len), .in_valid(enc_in_valid), .in_bit(enc_in_bit),
    .in_ready(enc_in_ready), .out_valid(tri_valid), .out_ready(tri_ready), .out_sys(tri_sys),
    .out_p1(tri_p1), .out_p2(tri_p2), .out_last(tri_last), .busy(enc_busy)
  );

  output_switch u_switch (
    .clk, .rst_n,
    .in_valid(tri_valid), .in_sys(tri_sys), .in_p1(tri_p1), .in_p2(tri_p2), .in_last(tri_last),
    .in_ready(tri_ready),
    .out_valid(enc_data_valid), .out_bit(enc_data_out), .out_last(enc_data_last),
    .out_ready(enc_data_ready)
  );

  turbo_decoder #(.K_MAX(K_MAX), .W(W), .ROWS(ROWS)) u_dec (
    .clk, .rst_n,
    .start(dec_start), .k_len(dec_k_len), .n_iter(dec_n_iter),
    .in_valid(dec_in_valid), .in_sys(dec_in_sys), .in_p1(dec_in_p1), .in_p2(dec_in_p2),
    .in_ready(dec_in_ready), .out_valid(dec_out_valid), .out_idx(dec_out_idx),
    .out_bit(dec_out_bit), .out_llr(dec_out_llr), .out_last(dec_out_last),
    .busy(dec_busy), .iter_count(dec_iter_count)
  );

  hybrid_llc #(
    .ADDR_W(LLC_ADDR_W), .DATA_W(LLC_DATA_W), .SETS(LLC_SETS), .NRET(LLC_NRET), .PRIO_W(3)
  ) u_llc (
    .clk, .rst_n,
    .req_valid(llc_req_valid), .req_addr(llc_req_addr), .req_ready(llc_req_ready),
    .resp_valid(llc_resp_valid), .resp_data(llc_resp_data),
    .resp_hit_main(llc_resp_hit_main), .resp_hit_ret(llc_resp_hit_ret),
    .mem_req_valid(llc_mem_req_valid), .mem_req_addr(llc_mem_req_addr),
    .mem_req_ready(llc_mem_req_ready), .mem_resp_valid(llc_mem_resp_valid),
    .mem_resp_data(llc_mem_resp_data), .n_retained(llc_n_retained)
  );

endmodule
