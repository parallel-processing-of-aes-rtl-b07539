// aes_add_round_key: the Addroundkey step, a 128-bit XOR of the state (din1)
// and the round key (din2), registered.
//
// Interface: clk, en, din1, din2, dout; one cycle of latency while en is
// high. The same unit serves encryption and decryption.
module aes_add_round_key
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  block_t din1,
  input  block_t din2,
  output block_t dout
);

  always_ff @(posedge clk)
    if (en) dout <= din1 ^ din2;

endmodule
