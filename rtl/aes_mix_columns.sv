// aes_mix_columns: the Mixcolumns step (or Inverse Mixcolumns with INVERSE=1)
// on NCOLS state columns, registered.
//
// Each 32-bit column is treated as a polynomial over GF(2^8) and multiplied
// by {03}x^3+{01}x^2+{01}x+{02} modulo x^4+1 (inverse: {0b}x^3+{0d}x^2+{09}x+{0e}),
// i.e. the usual 4x4 matrix product. Each of the 16 products of a column is
// formed by its own aes_gf_mul, whose output register is this unit's
// pipeline register; output byte r of a column is the XOR of the four
// registered products of its matrix row. NCOLS=4 is the whole-state unit
// (Mix-16); NCOLS=1 is the one-column unit (Mix-4). Interface: clk, en, din,
// dout; one cycle of latency while en is high (only the XOR lies after the
// registers). The polynomial is the FIPS-197 one; building the step from the
// byte multiplier with a matrix coefficient input follows the document's
// multiplier test, the register placement is this design's.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter int NCOLS   = 4,
  parameter bit INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [32*NCOLS-1:0]  din,
  output logic [32*NCOLS-1:0]  dout
);

  // first row of the circulant matrix; row r is this row rotated right by r
  function automatic byte_t coef(int d);
    case (d)
      0:       return INVERSE ? 8'h0e : 8'h02;
      1:       return INVERSE ? 8'h0b : 8'h03;
      2:       return INVERSE ? 8'h0d : 8'h01;
      default: return INVERSE ? 8'h09 : 8'h01;
    endcase
  endfunction

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    // byte k of the column is bits [32c + 31 - 8k -: 8]
    byte_t prod [4][4];   // prod[r][k] = coefficient(r,k) x byte k
    for (genvar r = 0; r < 4; r++) begin : g_row
      for (genvar k = 0; k < 4; k++) begin : g_term
        aes_gf_mul u_mul (
          .clk, .en,
          .din   (din[32*c + 31 - 8*k -: 8]),
          .mixmat(coef((k + 4 - r) % 4)),
          .dout  (prod[r][k])
        );
      end
      assign dout[32*c + 31 - 8*r -: 8] = prod[r][0] ^ prod[r][1] ^ prod[r][2] ^ prod[r][3];
    end
  end

endmodule
