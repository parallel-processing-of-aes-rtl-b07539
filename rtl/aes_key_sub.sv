// aes_key_sub: the "Key Sub" node of the key schedule, registered.
//
// Forward (INVERSE=0): from round key r-1 it forms the word
// SubWord(RotWord(w3)) ^ {Rcon(rnd),0,0,0} that starts round key rnd.
// Inverse (INVERSE=1): from round key rnd it forms the same word for the
// previous key; the previous key's last word is w3^w2 of the current key, so
// temp = SubWord(RotWord(w3^w2)) ^ {Rcon(rnd),0,0,0}. Interface: clk, en,
// key_in, rnd, temp; one cycle of latency. Which part of the key schedule
// belongs to this node and which to Key Sche is this design's choice.
module aes_key_sub
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   en,
  input  block_t key_in,
  input  rnd_t   rnd,
  output word_t  temp
);

  word_t last;

  assign last = INVERSE ? (key_in[31:0] ^ key_in[63:32]) : key_in[31:0];

  always_ff @(posedge clk)
    if (en) temp <= sub_word(rot_word(last)) ^ {rcon(rnd), 24'h0};

endmodule
