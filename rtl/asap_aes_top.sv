// asap_aes_top: the AES system as mapped onto the processor array. Data
// blocks and keys arrive on two input links, each buffered by a FIFO; an
// instruction input, inst_in, chooses which of the four parallel AES-128
// implementations processes them:
//
//   inst_in 0  Full-parallelism (four lanes, fed round-robin)
//   inst_in 1  loop unrolled three times
//   inst_in 2  loop unrolled nine times
//   inst_in 3  parallel MixColumns
//
// Whenever both FIFOs hold an entry and the chosen implementation can accept,
// one plaintext (FIFO 1) and one key (FIFO 2) are popped together; the
// ciphertext on input_decryption is taken in the same cycle and decrypted
// under that key. f1/f2 show the FIFO heads. output_encryption/enc_valid and
// output_decryption/dec_valid carry the results of the active
// implementation. When inst_in changes, no further blocks are popped until
// every block in flight has left (its decryption result, the later of the
// two, has appeared); then the new choice takes effect. This drain rule
// keeps results in order and never lets two implementations finish in the
// same cycle. ctrl=1 holds all four implementations.
//
// The basic encryption/decryption core (aes_enc_dec) stands beside the array
// with its own core_* ports. The signal names inst_in, fifo_in1/2, i1/i2,
// f1/f2 follow the document; the FIFO depth, the inst_in encoding, the
// write-strobe reading of i1/i2, the round-robin lane feed and the drain
// rule are this design's choices.
module asap_aes_top
  import aes_pkg::*;
#(
  parameter int FIFO_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctrl,
  input  logic [1:0] inst_in,
  // input links
  input  logic       i1,
  input  block_t     fifo_in1,
  input  logic       i2,
  input  block_t     fifo_in2,
  output block_t     f1,
  output block_t     f2,
  output logic       fifo1_full,
  output logic       fifo2_full,
  input  block_t     input_decryption,
  // results
  output block_t     output_encryption,
  output logic       enc_valid,
  output block_t     output_decryption,
  output logic       dec_valid,
  // basic encryption/decryption core
  input  logic       core_ctrl,
  input  logic       core_in_valid,
  output logic       core_in_ready,
  input  block_t     core_input_encryption,
  input  block_t     core_input_decryption,
  input  block_t     core_input_key,
  output block_t     core_output_encryption,
  output logic       core_enc_valid,
  output block_t     core_output_decryption,
  output logic       core_dec_valid
);

  localparam int LANES = 4;
  localparam int CNT_W = 9;   // up to 4 lanes x 60 cycles in flight

  typedef enum logic [1:0] {
    IMPL_FULL_PAR = 2'd0,
    IMPL_LOOP3    = 2'd1,
    IMPL_LOOP9    = 2'd2,
    IMPL_PAR_MIX  = 2'd3
  } impl_e;

  // ---- input links ------------------------------------------------------------
  logic empty1, empty2, pop;

  asap_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .wr_en(i1), .wr_data(fifo_in1), .rd_en(pop), .rd_data(f1),
    .full(fifo1_full), .empty(empty1)
  );
  asap_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .wr_en(i2), .wr_data(fifo_in2), .rd_en(pop), .rd_data(f2),
    .full(fifo2_full), .empty(empty2)
  );

  // ---- implementation select with drain ------------------------------------
  impl_e            active;
  logic [CNT_W-1:0] in_flight;
  logic             switching;
  logic [1:0]       lane;
  logic             sel_ready;

  logic [LANES-1:0] fp_in_valid, fp_in_ready, fp_enc_valid, fp_dec_valid;
  block_t           fp_pt [LANES], fp_ct [LANES], fp_key [LANES];
  block_t           fp_enc [LANES], fp_dec [LANES];

  logic   l3_ready, l3_ev, l3_dv, l9_ready, l9_ev, l9_dv, pm_ready, pm_ev, pm_dv;
  block_t l3_enc, l3_dec, l9_enc, l9_dec, pm_enc, pm_dec;

  assign switching = (impl_e'(inst_in) != active);

  always_comb
    unique case (active)
      IMPL_FULL_PAR: sel_ready = fp_in_ready[lane];
      IMPL_LOOP3:    sel_ready = l3_ready;
      IMPL_LOOP9:    sel_ready = l9_ready;
      IMPL_PAR_MIX:  sel_ready = pm_ready;
    endcase

  assign pop = !empty1 && !empty2 && !switching && sel_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active    <= IMPL_FULL_PAR;
      in_flight <= '0;
      lane      <= '0;
    end else begin
      in_flight <= in_flight + CNT_W'(pop) - CNT_W'(dec_valid);
      if (pop && active == IMPL_FULL_PAR) lane <= lane + 1'b1;
      if (switching && in_flight == '0) active <= impl_e'(inst_in);
    end

  // ---- the four implementations ----------------------------------------------
  for (genvar l = 0; l < LANES; l++) begin : g_fp_in
    assign fp_in_valid[l] = pop && (active == IMPL_FULL_PAR) && (lane == 2'(l));
    assign fp_pt[l]       = f1;
    assign fp_ct[l]       = input_decryption;
    assign fp_key[l]      = f2;
  end

  aes_full_parallel u_full_par (
    .clk, .rst_n, .ctrl,
    .in_valid(fp_in_valid), .in_ready(fp_in_ready),
    .input_encryption(fp_pt), .input_decryption(fp_ct), .input_key(fp_key),
    .output_encryption(fp_enc), .enc_valid(fp_enc_valid),
    .output_decryption(fp_dec), .dec_valid(fp_dec_valid)
  );

  aes_loop3 u_loop3 (
    .clk, .rst_n, .ctrl,
    .in_valid(pop && active == IMPL_LOOP3), .in_ready(l3_ready),
    .input_encryption(f1), .input_decryption(input_decryption), .input_key(f2),
    .output_encryption(l3_enc), .enc_valid(l3_ev), .output_decryption(l3_dec), .dec_valid(l3_dv)
  );

  aes_loop9 u_loop9 (
    .clk, .rst_n, .ctrl,
    .in_valid(pop && active == IMPL_LOOP9), .in_ready(l9_ready),
    .input_encryption(f1), .input_decryption(input_decryption), .input_key(f2),
    .output_encryption(l9_enc), .enc_valid(l9_ev), .output_decryption(l9_dec), .dec_valid(l9_dv)
  );

  aes_par_mixcol u_par_mix (
    .clk, .rst_n, .ctrl,
    .in_valid(pop && active == IMPL_PAR_MIX), .in_ready(pm_ready),
    .input_encryption(f1), .input_decryption(input_decryption), .input_key(f2),
    .output_encryption(pm_enc), .enc_valid(pm_ev), .output_decryption(pm_dec), .dec_valid(pm_dv)
  );

  // ---- result merge (only the active implementation can have blocks) -------
  always_comb begin
    output_encryption = '0;
    output_decryption = '0;
    enc_valid         = 1'b0;
    dec_valid         = 1'b0;
    unique case (active)
      IMPL_FULL_PAR:
        for (int l = 0; l < LANES; l++) begin
          if (fp_enc_valid[l]) begin
            enc_valid         = 1'b1;
            output_encryption = fp_enc[l];
          end
          if (fp_dec_valid[l]) begin
            dec_valid         = 1'b1;
            output_decryption = fp_dec[l];
          end
        end
      IMPL_LOOP3:   begin enc_valid = l3_ev; output_encryption = l3_enc;
                          dec_valid = l3_dv; output_decryption = l3_dec; end
      IMPL_LOOP9:   begin enc_valid = l9_ev; output_encryption = l9_enc;
                          dec_valid = l9_dv; output_decryption = l9_dec; end
      IMPL_PAR_MIX: begin enc_valid = pm_ev; output_encryption = pm_enc;
                          dec_valid = pm_dv; output_decryption = pm_dec; end
    endcase
  end

  // results never come from an implementation other than the active one
  a_quiet_others: assert property (@(posedge clk) disable iff (!rst_n)
    ((active != IMPL_FULL_PAR) |-> !(|fp_enc_valid) && !(|fp_dec_valid)) and
    ((active != IMPL_LOOP3)    |-> !l3_ev && !l3_dv) and
    ((active != IMPL_LOOP9)    |-> !l9_ev && !l9_dv) and
    ((active != IMPL_PAR_MIX)  |-> !pm_ev && !pm_dv));
  a_no_extra_result: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid |-> in_flight != '0);

  // ---- basic core ---------------------------------------------------------------
  aes_enc_dec u_core (
    .clk, .rst_n, .ctrl(core_ctrl),
    .in_valid(core_in_valid), .in_ready(core_in_ready),
    .input_encryption(core_input_encryption), .input_decryption(core_input_decryption),
    .input_key(core_input_key),
    .output_encryption(core_output_encryption), .enc_valid(core_enc_valid),
    .output_decryption(core_output_decryption), .dec_valid(core_dec_valid)
  );

endmodule
