// aes_key_expand: pipelined forward key expansion from the cipher key to
// round key NROUNDS, carrying a data block alongside.
//
// Each of the NROUNDS steps is a Key Sub node (one cycle) followed by a Key
// Sche node (one cycle), so the latency is 2*NROUNDS cycles and a new key can
// enter every cycle. The decryption datapaths use it to reach the last round
// key before the first inverse round; in_data/out_data carry the ciphertext
// through the same number of cycles. Everything advances only while en is
// high. Interface: in_valid/in_key/in_data in, out_valid/out_key/out_data out.
module aes_key_expand
  import aes_pkg::*;
#(
  parameter int NROUNDS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  block_t in_key,
  input  block_t in_data,
  output logic   out_valid,
  output block_t out_key,
  output block_t out_data
);

  localparam int LAT = 2 * NROUNDS;

  block_t key  [NROUNDS+1];   // key[i] = round key i at the input of step i+1
  block_t kdly [NROUNDS];     // key held during the Key Sub cycle
  word_t  temp [NROUNDS];
  block_t data [LAT+1];
  logic [LAT:0] v;

  assign key[0]  = in_key;
  assign data[0] = in_data;
  assign v[0]    = in_valid;

  for (genvar i = 0; i < NROUNDS; i++) begin : g_step
    aes_key_sub #(.INVERSE(1'b0)) u_ksub (
      .clk, .en, .key_in(key[i]), .rnd(rnd_t'(i + 1)), .temp(temp[i])
    );
    always_ff @(posedge clk)
      if (en) kdly[i] <= key[i];
    aes_key_sche #(.INVERSE(1'b0)) u_ksch (
      .clk, .en, .key_in(kdly[i]), .temp(temp[i]), .key_out(key[i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) v[LAT:1] <= '0;
    else if (en) v[LAT:1] <= v[LAT-1:0];

  always_ff @(posedge clk)
    if (en)
      for (int i = 1; i <= LAT; i++) data[i] <= data[i-1];

  assign out_valid = v[LAT];
  assign out_key   = key[NROUNDS];
  assign out_data  = data[LAT];

endmodule
