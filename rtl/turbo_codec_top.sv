// turbo_codec_top: turbo codec core, encoder and decoder side by side.
//
// The transmit path is a rate-1/3 turbo encoder (turbo_encoder: two UMTS
// constituent encoders and the collision-free interleaver, no termination).
// The receive path is the iterative decoder (turbo_decoder: P parallel
// max-log-MAP windows over banked single-port memories, decoded with the
// schedule in which each extrinsic value is written back where its a-priori
// value was read). Both share the interleaver construction, so a block
// encoded here, sent through a channel and demapped into soft values, is
// decoded by the receive path. The channel, mapping and demapping are
// outside the core.
//
// Both paths use the same block length N = P * win_len, set per block on
// each path; with the defaults (P = 4 windows, WMAX = 108) N ranges over the
// multiples of 16 from 32 to 432. See the two sub-modules for the timing of
// their ports, which are brought out unchanged with an enc_ / dec_ prefix.
module turbo_codec_top
  import turbo_pkg::*;
#(
  parameter int unsigned P    = 4,
  parameter int unsigned WMAX = 108
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // encoder
  input  logic [$clog2(WMAX+1)-1:0]   enc_win_len,
  input  logic                        enc_in_valid,
  input  logic                        enc_in_bit,
  output logic                        enc_in_ready,
  output logic                        enc_out_valid,
  output logic                        enc_out_s,
  output logic                        enc_out_c1,
  output logic                        enc_out_c2,
  output logic [$clog2(P*WMAX)-1:0]   enc_out_pos,
  // decoder
  input  logic [$clog2(WMAX+1)-1:0]   dec_win_len,
  input  logic [3:0]                  dec_n_iter,
  input  logic                        dec_in_valid,
  input  logic signed [LLR_W-1:0]     dec_in_ys,
  input  logic signed [LLR_W-1:0]     dec_in_y1p,
  input  logic signed [LLR_W-1:0]     dec_in_y2p,
  output logic                        dec_in_ready,
  output logic                        dec_out_valid,
  output logic                        dec_out_bit,
  output logic [$clog2(P*WMAX)-1:0]   dec_out_pos,
  output logic                        dec_half_done,
  output logic                        dec_xbar_perm,
  output logic                        dec_collision
);

  turbo_encoder #(.P(P), .WMAX(WMAX)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .win_len  (enc_win_len),
    .in_valid (enc_in_valid),
    .in_bit   (enc_in_bit),
    .in_ready (enc_in_ready),
    .out_valid(enc_out_valid),
    .out_s    (enc_out_s),
    .out_c1   (enc_out_c1),
    .out_c2   (enc_out_c2),
    .out_pos  (enc_out_pos)
  );

  turbo_decoder #(.P(P), .WMAX(WMAX)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .win_len  (dec_win_len),
    .n_iter   (dec_n_iter),
    .in_valid (dec_in_valid),
    .in_ys    (dec_in_ys),
    .in_y1p   (dec_in_y1p),
    .in_y2p   (dec_in_y2p),
    .in_ready (dec_in_ready),
    .out_valid(dec_out_valid),
    .out_bit  (dec_out_bit),
    .out_pos  (dec_out_pos),
    .half_done(dec_half_done),
    .xbar_perm(dec_xbar_perm),
    .collision(dec_collision)
  );

endmodule
