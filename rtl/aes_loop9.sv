// aes_loop9: AES-128 with the main loop unrolled nine times and the key
// expansion ten times. Nine round stages (Sub-16, Shiftrows, Mix-16,
// Addroundkey, with Key Sub/Key Sche beside them) and the final round form a
// pipeline that accepts a new plaintext/ciphertext pair, each with its own
// key, every cycle.
//
// Ports as aes_enc_dec. ctrl=1 holds everything. Encryption latency
// 1 + 9*4 + 3 = 40 cycles, decryption 60 (20 cycles of key expansion first).
// The unrolled shape is the document's; the cycle timing is this design's.
module aes_loop9
  import aes_pkg::*;
#(
  parameter int NSEG       = 9,
  parameter int ITER       = 1,
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
