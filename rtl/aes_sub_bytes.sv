// aes_sub_bytes: the Substitution step (SubBytes) or, with INVERSE=1, the
// Inverse Substitution, applied to NBYTES bytes and registered.
//
// NBYTES=16 is the whole-state unit (Sub-16); NBYTES=4 is the one-column unit
// (Sub-4) of which the parallel variants place four side by side. Each byte
// goes through the S-box table from aes_pkg. Interface: clk, en, din, dout;
// dout is loaded with the substituted din on a rising clk edge while en is
// high, so the latency is one cycle. The clk/en/input/output port set follows
// the document; register-with-enable timing is this design's reading of it.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter int NBYTES  = 16,
  parameter bit INVERSE = 1'b0
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [8*NBYTES-1:0]   din,
  output logic [8*NBYTES-1:0]   dout
);

  logic [8*NBYTES-1:0] sub;

  always_comb
    for (int i = 0; i < NBYTES; i++)
      sub[8*i +: 8] = sub_byte(din[8*i +: 8], INVERSE);

  always_ff @(posedge clk)
    if (en) dout <= sub;

endmodule
