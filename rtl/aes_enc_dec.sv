// aes_enc_dec: AES-128 encryption and decryption side by side. One block of
// plaintext and one of ciphertext enter together under the same cipher key;
// the encryption result and the decryption result leave separately.
//
// Two aes_cipher_engine datapaths (DECRYPT=0 and 1) with the same shape
// parameters. With its defaults (one round stage looping nine times, Sub-16
// and Mix-16) this is the basic iterative core; the parallel implementations
// reuse it with other shapes. Ports follow the document's encryption and
// decryption unit (clk, ctrl, input_encryption, input_decryption, input_key,
// output_encryption, output_decryption); the reading of ctrl as a hold
// (ctrl=1 freezes every stage) and the in_valid/in_ready, enc_valid and
// dec_valid handshake are this design's. A pair is accepted only when both
// datapaths can take it. enc_valid and dec_valid pulse for one cycle;
// decryption finishes 20 cycles after encryption (key expansion first).
module aes_enc_dec
  import aes_pkg::*;
#(
  parameter int NSEG       = 1,
  parameter int ITER       = 9,
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
