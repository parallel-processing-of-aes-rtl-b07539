// aes_par_mixcol: AES-128 in the parallel-MixColumns form. A single round
// stage with four Sub-4 and four Mix-4 units working on the four state
// columns at once (plus Shiftrows, Addroundkey, Key Sub and Key Sche) loops
// nine times over one block; the final round uses one Sub-16, Shiftrows and
// Addroundkey.
//
// Ports as aes_enc_dec. ctrl=1 holds everything. One block per direction is
// in flight: encryption latency 1 + (4*9+1) + 3 = 41 cycles, decryption 61.
// In this hardware a Sub-4 group finishes in the same single cycle as a
// Sub-16, so the parallel split changes the structure, not the timing. The
// shape is the document's; the timing is this design's.
module aes_par_mixcol
  import aes_pkg::*;
#(
  parameter int NSEG       = 1,
  parameter int ITER       = 9,
  parameter int NSUB       = 4,
  parameter int NMIX       = 4,
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
