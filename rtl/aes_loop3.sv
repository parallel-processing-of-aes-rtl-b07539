// aes_loop3: AES-128 with the main loop unrolled three times. The nine
// middle rounds are split over three round stages in series; each stage has
// one Sub-16, Shiftrows, Mix-16 and Addroundkey unit with Key Sub/Key Sche
// beside it and sends its block round three times before passing it on, so
// up to three blocks (one per stage) are in flight in each direction. The
// final round (Sub-16, Shiftrows, Addroundkey) follows.
//
// Ports as aes_enc_dec: a plaintext/ciphertext pair under one key is taken
// on in_valid && in_ready; enc_valid/dec_valid flag the results. ctrl=1
// holds everything. Encryption latency 1 + 3*(4*3+1) + 3 = 43 cycles,
// decryption 63; a stage is busy 13 cycles per block, which sets the
// steady-state rate. The three-stages-of-three-loops shape is the document's;
// the cycle timing is this design's.
module aes_loop3
  import aes_pkg::*;
#(
  parameter int NSEG       = 3,
  parameter int ITER       = 3,
  parameter int NSUB       = 1,
  parameter int NMIX       = 1,
  parameter int FINAL_NSUB = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ctrl,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t input_encryption,
  input  block_t input_decryption,
  input  block_t input_key,
  output block_t output_encryption,
  output logic   enc_valid,
  output block_t output_decryption,
  output logic   dec_valid
);

  logic en, enc_ready, dec_ready, take;

  assign en       = !ctrl;
  assign in_ready = enc_ready && dec_ready;
  assign take     = in_valid && in_ready;

  aes_cipher_engine #(
    .DECRYPT(1'b0), .NSEG(NSEG), .ITER(ITER), .NSUB(NSUB), .NMIX(NMIX), .FINAL_NSUB(FINAL_NSUB)
  ) u_enc (
    .clk, .rst_n, .en,
    .in_valid (take),      .in_ready (enc_ready),
    .in_block (input_encryption), .in_key (input_key),
    .out_valid(enc_valid), .out_block(output_encryption)
  );

  aes_cipher_engine #(
    .DECRYPT(1'b1), .NSEG(NSEG), .ITER(ITER), .NSUB(NSUB), .NMIX(NMIX), .FINAL_NSUB(FINAL_NSUB)
  ) u_dec (
    .clk, .rst_n, .en,
    .in_valid (take),      .in_ready (dec_ready),
    .in_block (input_decryption), .in_key (input_key),
    .out_valid(dec_valid), .out_block(output_decryption)
  );


endmodule
