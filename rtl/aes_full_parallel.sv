// aes_full_parallel: the Full-parallelism AES-128 implementation. It joins
// the parallel-SubBytes/MixColumns round (four Sub-4 and four Mix-4 units,
// one per state column) with full loop unrolling: nine such round stages and
// the final round (four Sub-4, Shiftrows, Addroundkey) form a pipeline that
// takes a new block every cycle, with the key schedule (Key Sub, Key Sche)
// unrolled beside it. Encryption and decryption run side by side, and the
// whole pair is replicated over LANES independent lanes, each with its own
// plaintext, ciphertext and key.
//
// Ports are per lane, packed as arrays indexed by lane: a pair is taken on
// in_valid[l] && in_ready[l]; enc_valid[l]/dec_valid[l] flag the results.
// ctrl=1 holds every lane. Encryption latency 1 + 9*4 + 3 = 40 cycles,
// decryption 60. The round shape, the unrolling and the four lanes follow
// the document; the cycle timing and the handshake are this design's.
module aes_full_parallel
  import aes_pkg::*;
#(
  parameter int LANES      = 4,
  parameter int NSEG       = 9,
  parameter int ITER       = 1,
  parameter int NSUB       = 4,
  parameter int NMIX       = 4,
  parameter int FINAL_NSUB = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ctrl,
  input  logic [LANES-1:0]   in_valid,
  output logic [LANES-1:0]   in_ready,
  input  block_t             input_encryption  [LANES],
  input  block_t             input_decryption  [LANES],
  input  block_t             input_key         [LANES],
  output block_t             output_encryption [LANES],
  output logic [LANES-1:0]   enc_valid,
  output block_t             output_decryption [LANES],
  output logic [LANES-1:0]   dec_valid
);

  logic en;
  assign en = !ctrl;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic enc_ready, dec_ready, take;

    assign in_ready[l] = enc_ready && dec_ready;
    assign take        = in_valid[l] && in_ready[l];

    aes_cipher_engine #(
      .DECRYPT(1'b0), .NSEG(NSEG), .ITER(ITER), .NSUB(NSUB), .NMIX(NMIX), .FINAL_NSUB(FINAL_NSUB)
    ) u_enc (
      .clk, .rst_n, .en,
      .in_valid (take),         .in_ready (enc_ready),
      .in_block (input_encryption[l]), .in_key (input_key[l]),
      .out_valid(enc_valid[l]), .out_block(output_encryption[l])
    );

    aes_cipher_engine #(
      .DECRYPT(1'b1), .NSEG(NSEG), .ITER(ITER), .NSUB(NSUB), .NMIX(NMIX), .FINAL_NSUB(FINAL_NSUB)
    ) u_dec (
      .clk, .rst_n, .en,
      .in_valid (take),         .in_ready (dec_ready),
      .in_block (input_decryption[l]), .in_key (input_key[l]),
      .out_valid(dec_valid[l]), .out_block(output_decryption[l])
    );
  end

endmodule
