// aes_enc_round: one AES encryption round as a pipeline of the registered
// step units, with the round key produced beside the state.
//
//   cycle 1  Substitution (NSUB units of 16/NSUB bytes)   | Key Sub (Rcon(in_rnd))
//   cycle 2  Shiftrows                                     | Key Sche -> key in_rnd
//   cycle 3  Mixcolumns (NMIX units of 4/NMIX columns)     | key delay
//   cycle 4  Addroundkey with key in_rnd                   | key delay
//
// With FINAL=1 Mixcolumns is left out (the last round) and Addroundkey is
// cycle 3. NSUB=4/NMIX=4 gives the four Sub-4 and four Mix-4 units of the
// parallel variants; NSUB=1/NMIX=1 the Sub-16 and Mix-16 units. Both take one
// cycle here, so NSUB and NMIX change the structure, not the timing.
//
// Interface: in_key is round key in_rnd-1 and out_key is round key in_rnd,
// out_rnd = in_rnd+1, so rounds chain directly. in_valid travels with the
// data as out_valid. Everything advances only while en is high. Latency
// LATENCY = 4 (3 when FINAL). Timing of the key path is this design's own.
module aes_enc_round
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

  // sideband pipeline: valid and round number, one entry per stage
  logic [LATENCY:1] v;
  rnd_t             r [LATENCY:1];
  block_t           k1, k3;

  block_t s_sub, s_shift;
  word_t  temp;
  block_t nkey;

  for (genvar g = 0; g < NSUB; g++) begin : g_sub
    aes_sub_bytes #(.NBYTES(16/NSUB), .INVERSE(1'b0)) u_sub (
      .clk, .en,
      .din  (in_state[g*(128/NSUB) +: 128/NSUB]),
      .dout (s_sub   [g*(128/NSUB) +: 128/NSUB])
    );
  end

  aes_shift_rows #(.INVERSE(1'b0)) u_shift (.clk, .en, .din(s_sub), .dout(s_shift));

  aes_key_sub  #(.INVERSE(1'b0)) u_ksub (.clk, .en, .key_in(in_key), .rnd(in_rnd), .temp(temp));
  aes_key_sche #(.INVERSE(1'b0)) u_ksch (.clk, .en, .key_in(k1), .temp(temp), .key_out(nkey));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v <= '0;
    else if (en) v <= {v[LATENCY-1:1], in_valid};

  always_ff @(posedge clk)
    if (en) begin
      r[1] <= in_rnd;
      for (int i = 2; i <= LATENCY; i++) r[i] <= r[i-1];
      k1 <= in_key;
    end

  if (FINAL) begin : g_final
    aes_add_round_key u_ark (.clk, .en, .din1(s_shift), .din2(nkey), .dout(out_state));
    always_ff @(posedge clk)
      if (en) k3 <= nkey;
    assign out_key = k3;
  end else begin : g_round
    block_t s_mix, k4;
    for (genvar g = 0; g < NMIX; g++) begin : g_mix
      aes_mix_columns #(.NCOLS(4/NMIX), .INVERSE(1'b0)) u_mix (
        .clk, .en,
        .din  (s_shift[g*(128/NMIX) +: 128/NMIX]),
        .dout (s_mix  [g*(128/NMIX) +: 128/NMIX])
      );
    end
    aes_add_round_key u_ark (.clk, .en, .din1(s_mix), .din2(k3), .dout(out_state));
    always_ff @(posedge clk)
      if (en) begin
        k3 <= nkey;
        k4 <= k3;
      end
    assign out_key = k4;
  end

  assign out_valid = v[LATENCY];
  assign out_rnd   = r[LATENCY] + rnd_t'(1);

endmodule
