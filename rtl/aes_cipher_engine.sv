// aes_cipher_engine: a complete AES-128 datapath, encryption (DECRYPT=0) or
// decryption (DECRYPT=1), built as a chain of round stages whose shape the
// parameters choose:
//
//   [key expansion, decryption only] -> Addroundkey -> NSEG round stages,
//   each looping ITER times -> final round (no (Inverse) Mixcolumns)
//
// NSEG*ITER must be 9 (Nr-1). NSEG=9, ITER=1 is the fully unrolled pipeline
// (one block per cycle); NSEG=3, ITER=3 and NSEG=1, ITER=9 are the looped
// forms. NSUB/NMIX choose one Sub-16/Mix-16 or four Sub-4/Mix-4 units per
// round stage, FINAL_NSUB the Sub units of the final round. Round keys are
// computed on the fly next to the data, so every block may carry its own key.
// Decryption first runs the key through aes_key_expand (20 cycles) to reach
// round key 10, then walks the schedule backwards.
//
// Handshake: a block is taken when in_valid && in_ready. The front part (key
// expansion and the first Addroundkey) is one stalling pipeline that stops
// while its last register waits for the first round stage. out_valid pulses
// for one cycle with out_block; there is no output back-pressure. en=0
// freezes the whole engine. Latency from acceptance, with no waiting:
// LAT_ENC = 1 + NSEG*(4*ITER + (ITER>1)) + 3, plus 20 for decryption.
// The stage structure follows the document's dataflow figures; the
// handshake, the latencies and the decryption key handling are this design's.
module aes_cipher_engine
  import aes_pkg::*;
#(
  parameter bit DECRYPT    = 1'b0,
  parameter int NSEG       = 9,
  parameter int ITER       = 1,
  parameter int NSUB       = 1,
  parameter int NMIX       = 1,
  parameter int FINAL_NSUB = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_block,
  input  block_t in_key,
  output logic   out_valid,
  output block_t out_block
);

  if (NSEG * ITER != NR - 1) begin : g_bad_shape
    $error("aes_cipher_engine: NSEG*ITER must be %0d", NR - 1);
  end

  // ---- front: optional key expansion, then the first Addroundkey --------
  logic   adv;          // front pipeline advances
  logic   f_valid;      // into the first Addroundkey
  block_t f_block, f_key;
  logic   a_valid;      // first Addroundkey output register
  block_t a_state, a_key;

  logic   seg_in_valid [NSEG+1];
  logic   seg_in_ready [NSEG+1];
  rnd_t   seg_rnd      [NSEG+1];
  block_t seg_state    [NSEG+1];
  block_t seg_key      [NSEG+1];

  assign adv      = en && !(a_valid && !seg_in_ready[0]);
  assign in_ready = adv;

  if (DECRYPT) begin : g_kexp
    aes_key_expand #(.NROUNDS(NR)) u_kexp (
      .clk, .rst_n, .en(adv),
      .in_valid (in_valid), .in_key (in_key), .in_data (in_block),
      .out_valid(f_valid),  .out_key(f_key),  .out_data(f_block)
    );
  end else begin : g_nokexp
    assign f_valid = in_valid;
    assign f_key   = in_key;
    assign f_block = in_block;
  end

  aes_add_round_key u_ark0 (.clk, .en(adv), .din1(f_block), .din2(f_key), .dout(a_state));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) a_valid <= 1'b0;
    else if (adv) a_valid <= f_valid;

  always_ff @(posedge clk)
    if (adv) a_key <= f_key;

  assign seg_in_valid[0] = a_valid;
  assign seg_rnd[0]      = DECRYPT ? rnd_t'(NR) : rnd_t'(1);
  assign seg_state[0]    = a_state;
  assign seg_key[0]      = a_key;

  // ---- NSEG round stages --------------------------------------------------
  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    aes_round_loop #(.DECRYPT(DECRYPT), .ITER(ITER), .NSUB(NSUB), .NMIX(NMIX)) u_loop (
      .clk, .rst_n, .en,
      .in_valid (seg_in_valid[s]),   .in_ready (seg_in_ready[s]),
      .in_rnd   (seg_rnd[s]),        .in_state (seg_state[s]),   .in_key (seg_key[s]),
      .out_valid(seg_in_valid[s+1]), .out_ready(seg_in_ready[s+1]),
      .out_rnd  (seg_rnd[s+1]),      .out_state(seg_state[s+1]), .out_key(seg_key[s+1])
    );
  end

  // ---- final round ---------------------------------------------------------
  assign seg_in_ready[NSEG] = 1'b1;

  logic   fin_valid;
  rnd_t   fin_rnd;
  block_t fin_key;   // round key 10 (encryption) or the cipher key (decryption); not used further

  if (DECRYPT) begin : g_dfin
    aes_dec_round #(.NSUB(FINAL_NSUB), .NMIX(1), .FINAL(1'b1)) u_final (
      .clk, .rst_n, .en,
      .in_valid (seg_in_valid[NSEG]), .in_rnd (seg_rnd[NSEG]), .in_state (seg_state[NSEG]), .in_key (seg_key[NSEG]),
      .out_valid(fin_valid),          .out_rnd(fin_rnd),       .out_state(out_block),       .out_key(fin_key)
    );
  end else begin : g_efin
    aes_enc_round #(.NSUB(FINAL_NSUB), .NMIX(1), .FINAL(1'b1)) u_final (
      .clk, .rst_n, .en,
      .in_valid (seg_in_valid[NSEG]), .in_rnd (seg_rnd[NSEG]), .in_state (seg_state[NSEG]), .in_key (seg_key[NSEG]),
      .out_valid(fin_valid),          .out_rnd(fin_rnd),       .out_state(out_block),       .out_key(fin_key)
    );
  end

  // a held engine presents no new result
  assign out_valid = fin_valid && en;

  // the final round must be round 10 (encryption) or use round key 1 (decryption)
  a_final_round: assert property (@(posedge clk) disable iff (!rst_n)
    en && seg_in_valid[NSEG] |-> seg_rnd[NSEG] == (DECRYPT ? rnd_t'(1) : rnd_t'(NR)));
  a_final_out: assert property (@(posedge clk) disable iff (!rst_n)
    fin_valid |-> fin_rnd == (DECRYPT ? rnd_t'(0) : rnd_t'(NR + 1)));

endmodule
