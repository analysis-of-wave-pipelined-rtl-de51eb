// ara_ldpc_top -- ARA-LDPC codec: wave-pipelined encoder and hard-decision decoder.
//
// Two independent paths share only the clock and reset, as on either end of a
// channel:
//   * encoder path: 8-bit message words enter at enc_in_*, one per clock if
//     wanted, and leave one clock later as 16-bit systematic codewords at
//     enc_out_* (ara_wp_encoder).  A block framer counts the emitted codewords
//     into blocks of BLOCK_BITS message bits and flags the first (sob) and last
//     (eob) codeword of each block; enc_word_idx is the codeword's position in
//     its block.
//   * decoder path: received 16-bit codewords enter at dec_in_* under a
//     valid/ready handshake, are decoded iteratively (ara_hd_decoder) and leave
//     at dec_out_* with the decoded message, the corrected codeword, a
//     converged flag and the number of iterations; a second block framer marks
//     block boundaries on the decoded stream.
// Word length 8 bits and block size 1024 bits follow the design; the framing
// flags, the block counters and the decoder handshake are this design's own.
module ara_ldpc_top
  import ara_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = ara_pkg::WORDS_PER_BLOCK,
  parameter int unsigned MAX_ITER    = ara_pkg::MAX_ITER_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  // encoder path
  input  logic        enc_in_valid,
  input  msg_t        enc_in_msg,
  output logic        enc_out_valid,
  output cw_t         enc_out_cw,
  output logic        enc_out_sob,
  output logic        enc_out_eob,
  output logic [$clog2(BLOCK_WORDS)-1:0] enc_word_idx,
  output logic [15:0] enc_blocks,
  // decoder path
  input  logic        dec_in_valid,
  output logic        dec_in_ready,
  input  cw_t         dec_in_cw,
  output logic        dec_out_valid,
  input  logic        dec_out_ready,
  output msg_t        dec_out_msg,
  output cw_t         dec_out_cw,
  output logic        dec_out_converged,
  output logic [$clog2(MAX_ITER+1)-1:0] dec_out_iters,
  output logic        dec_out_sob,
  output logic        dec_out_eob,
  output logic [$clog2(BLOCK_WORDS)-1:0] dec_word_idx,
  output logic [15:0] dec_blocks
);

  // ---- encoder path ------------------------------------------------------
  ara_wp_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_in_valid),
    .in_msg    (enc_in_msg),
    .out_valid (enc_out_valid),
    .out_cw    (enc_out_cw)
  );

  ara_block_framer #(.WORDS(BLOCK_WORDS)) u_enc_framer (
    .clk      (clk),
    .rst_n    (rst_n),
    .advance  (enc_out_valid),
    .word_idx (enc_word_idx),
    .sob      (enc_out_sob),
    .eob      (enc_out_eob),
    .blocks   (enc_blocks)
  );

  // ---- decoder path ------------------------------------------------------
  ara_hd_decoder #(.MAX_ITER(MAX_ITER)) u_dec (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (dec_in_valid),
    .in_ready      (dec_in_ready),
    .in_cw         (dec_in_cw),
    .out_valid     (dec_out_valid),
    .out_ready     (dec_out_ready),
    .out_msg       (dec_out_msg),
    .out_cw        (dec_out_cw),
    .out_converged (dec_out_converged),
    .out_iters     (dec_out_iters)
  );

  ara_block_framer #(.WORDS(BLOCK_WORDS)) u_dec_framer (
    .clk      (clk),
    .rst_n    (rst_n),
    .advance  (dec_out_valid && dec_out_ready),
    .word_idx (dec_word_idx),
    .sob      (dec_out_sob),
    .eob      (dec_out_eob),
    .blocks   (dec_blocks)
  );

endmodule
