// aes_dec_round: one AES decryption round as a pipeline of the registered
// inverse step units, with the inverse key schedule beside the state.
//
//   cycle 1  Inverse Shiftrows                            | inverse Key Sub (Rcon(in_rnd))
//   cycle 2  Inverse Substitution (NSUB units)            | inverse Key Sche -> key in_rnd-1
//   cycle 3  Addroundkey with key in_rnd-1                | key delay
//   cycle 4  Inverse Mixcolumns (NMIX units)              | key delay
//
// The step order is the document's decryption round. With FINAL=1 Inverse
// Mixcolumns is left out (the last round, LATENCY 3). Interface: in_key is
// round key in_rnd (10 for the first round), out_key is round key in_rnd-1
// and out_rnd = in_rnd-1. Everything advances only while en is high.
// Recomputing the previous round key from the current one (rather than
// storing the expanded schedule) is this design's choice.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter int NSUB  = 1,
  parameter int NMIX  = 1,
  parameter bit FINAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  rnd_t   in_rnd,
  input  block_t in_state,
  input  block_t in_key,
  output logic   out_valid,
  output rnd_t   out_rnd,
  output block_t out_state,
  output block_t out_key
);

  localparam int LATENCY = FINAL ? 3 : 4;

  logic [LATENCY:1] v;
  rnd_t             r [LATENCY:1];
  block_t           k1, k3;

  block_t s_shift, s_sub, s_ark;
  word_t  temp;
  block_t pkey;

  aes_shift_rows #(.INVERSE(1'b1)) u_shift (.clk, .en, .din(in_state), .dout(s_shift));

  for (genvar g = 0; g < NSUB; g++) begin : g_sub
    aes_sub_bytes #(.NBYTES(16/NSUB), .INVERSE(1'b1)) u_sub (
      .clk, .en,
      .din  (s_shift[g*(128/NSUB) +: 128/NSUB]),
      .dout (s_sub  [g*(128/NSUB) +: 128/NSUB])
    );
  end

  aes_key_sub  #(.INVERSE(1'b1)) u_ksub (.clk, .en, .key_in(in_key), .rnd(in_rnd), .temp(temp));
  aes_key_sche #(.INVERSE(1'b1)) u_ksch (.clk, .en, .key_in(k1), .temp(temp), .key_out(pkey));

  aes_add_round_key u_ark (.clk, .en, .din1(s_sub), .din2(pkey), .dout(s_ark));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v <= '0;
    else if (en) v <= {v[LATENCY-1:1], in_valid};

  always_ff @(posedge clk)
    if (en) begin
      r[1] <= in_rnd;
      for (int i = 2; i <= LATENCY; i++) r[i] <= r[i-1];
      k1 <= in_key;
      k3 <= pkey;
    end

  if (FINAL) begin : g_final
    assign out_state = s_ark;
    assign out_key   = k3;
  end else begin : g_round
    block_t k4;
    for (genvar g = 0; g < NMIX; g++) begin : g_mix
      aes_mix_columns #(.NCOLS(4/NMIX), .INVERSE(1'b1)) u_mix (
        .clk, .en,
        .din  (s_ark    [g*(128/NMIX) +: 128/NMIX]),
        .dout (out_state[g*(128/NMIX) +: 128/NMIX])
      );
    end
    always_ff @(posedge clk)
      if (en) k4 <= k3;
    assign out_key = k4;
  end

  assign out_valid = v[LATENCY];
  assign out_rnd   = r[LATENCY] - rnd_t'(1);

endmodule
