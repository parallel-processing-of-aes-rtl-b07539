// aes_key_sche: the "Key Sche" node of the key schedule, registered.
//
// Forward (INVERSE=0): next key words are w0'=w0^temp, w1'=w1^w0',
// w2'=w2^w1', w3'=w3^w2'. Inverse (INVERSE=1): previous key words are
// w0'=w0^temp, w1'=w1^w0, w2'=w2^w1, w3'=w3^w2. temp comes from aes_key_sub.
// Interface: clk, en, key_in, temp, key_out; one cycle of latency.
module aes_key_sche
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   en,
  input  block_t key_in,
  input  word_t  temp,
  output block_t key_out
);

  word_t w [4];
  word_t n [4];

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127 - 32*i -: 32];
    n[0] = w[0] ^ temp;
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ (INVERSE ? w[i-1] : n[i-1]);
  end

  always_ff @(posedge clk)
    if (en) key_out <= {n[0], n[1], n[2], n[3]};

endmodule
