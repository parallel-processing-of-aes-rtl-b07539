// aes_shift_rows: the Shiftrows step (INVERSE=0: row r rotated left by r
// bytes) or Inverse Shiftrows (rotated right), registered.
//
// The state is column-major (byte i = row i%4, column i/4, byte 0 in bits
// 127:120), as the document states and FIPS-197 defines. Interface: clk, en,
// din, dout; one cycle of latency while en is high. Pure wiring plus the
// register.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   en,
  input  block_t din,
  output block_t dout
);

  always_ff @(posedge clk)
    if (en) dout <= shift_rows(din, INVERSE);

endmodule
