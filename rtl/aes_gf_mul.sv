// aes_gf_mul: one-byte multiplier in GF(2^8), the arithmetic behind
// Mixcolumns, registered.
//
// dout = din x mixmat modulo x^8+x^4+x^3+x+1, computed by shift-and-add
// (xtime). Interface: clk, en, din (the state byte), mixmat (the matrix
// coefficient), dout; one cycle of latency while en is high. The port set
// follows the document's multiplier test. aes_mix_columns is built from 16
// of these per column, their registers forming its pipeline stage.
module aes_gf_mul
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  byte_t din,
  input  byte_t mixmat,
  output byte_t dout
);

  always_ff @(posedge clk)
    if (en) dout <= gf_mul(din, mixmat);

endmodule
