// aes_round_loop: one round stage of the unrolled/looped AES datapaths: a
// single round unit that applies ITER consecutive rounds to a block by
// feeding its own output back to its input.
//
// ITER=1: a plain pipeline stage (LATENCY 4); it accepts every cycle
// (in_ready=1) and expects the next stage to do the same.
// ITER>1: the stage holds one block. On acceptance the block enters the round
// unit; each time it comes out it is sent round again until ITER rounds are
// done, then it waits in an output register (out_valid) until out_ready.
// in_ready is high while the stage is empty or its finished block is being
// taken, so a new block can enter in the cycle the old one leaves. The
// loop-back is a multiplexer in front of the round unit, so a block spends
// 4*ITER+1 cycles in the stage and a busy stage takes a new block every
// 4*ITER+1 cycles. DECRYPT selects aes_dec_round instead of aes_enc_round. The
// round number and key travel with the state. Everything advances only while
// en is high. The looping follows the document's dataflow figures; holding a
// single block per stage is this design's choice.
module aes_round_loop
  import aes_pkg::*;
#(
  parameter bit DECRYPT = 1'b0,
  parameter int ITER    = 3,
  parameter int NSUB    = 1,
  parameter int NMIX    = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  output logic   in_ready,
  input  rnd_t   in_rnd,
  input  block_t in_state,
  input  block_t in_key,
  output logic   out_valid,
  input  logic   out_ready,
  output rnd_t   out_rnd,
  output block_t out_state,
  output block_t out_key
);

  logic   ru_in_valid, ru_out_valid;
  rnd_t   ru_in_rnd, ru_out_rnd;
  block_t ru_in_state, ru_out_state, ru_in_key, ru_out_key;

  if (DECRYPT) begin : g_dec
    aes_dec_round #(.NSUB(NSUB), .NMIX(NMIX), .FINAL(1'b0)) u_round (
      .clk, .rst_n, .en,
      .in_valid (ru_in_valid),  .in_rnd (ru_in_rnd),  .in_state (ru_in_state),  .in_key (ru_in_key),
      .out_valid(ru_out_valid), .out_rnd(ru_out_rnd), .out_state(ru_out_state), .out_key(ru_out_key)
    );
  end else begin : g_enc
    aes_enc_round #(.NSUB(NSUB), .NMIX(NMIX), .FINAL(1'b0)) u_round (
      .clk, .rst_n, .en,
      .in_valid (ru_in_valid),  .in_rnd (ru_in_rnd),  .in_state (ru_in_state),  .in_key (ru_in_key),
      .out_valid(ru_out_valid), .out_rnd(ru_out_rnd), .out_state(ru_out_state), .out_key(ru_out_key)
    );
  end

  if (ITER == 1) begin : g_pipe
    assign in_ready    = 1'b1;
    assign ru_in_valid = in_valid;
    assign ru_in_rnd   = in_rnd;
    assign ru_in_state = in_state;
    assign ru_in_key   = in_key;
    assign out_valid   = ru_out_valid;
    assign out_rnd     = ru_out_rnd;
    assign out_state   = ru_out_state;
    assign out_key     = ru_out_key;

    // a pure pipeline stage cannot wait
    a_taken: assert property (@(posedge clk) disable iff (!rst_n) en && out_valid |-> out_ready);
  end else begin : g_loop
    localparam int CW = $clog2(ITER);
    logic          busy;
    logic [CW-1:0] done_cnt;   // rounds completed for the block inside
    logic          last;
    logic          hold_valid;
    rnd_t          hold_rnd;
    block_t        hold_state, hold_key;

    // a new block may enter in the cycle the finished one leaves
    assign in_ready = !busy || (hold_valid && out_ready);
    assign last     = (done_cnt == CW'(ITER - 1));

    // loop-back multiplexer
    assign ru_in_valid = (in_valid && in_ready) || (ru_out_valid && !last);
    assign ru_in_rnd   = ru_out_valid ? ru_out_rnd   : in_rnd;
    assign ru_in_state = ru_out_valid ? ru_out_state : in_state;
    assign ru_in_key   = ru_out_valid ? ru_out_key   : in_key;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        busy       <= 1'b0;
        done_cnt   <= '0;
        hold_valid <= 1'b0;
      end else if (en) begin
        if (hold_valid && out_ready) begin
          hold_valid <= 1'b0;
          busy       <= 1'b0;
        end
        if (in_valid && in_ready) begin
          busy     <= 1'b1;
          done_cnt <= '0;
        end
        if (ru_out_valid) begin
          if (last) hold_valid <= 1'b1;
          else      done_cnt   <= done_cnt + 1'b1;
        end
      end

    always_ff @(posedge clk)
      if (en && ru_out_valid && last) begin
        hold_rnd   <= ru_out_rnd;
        hold_state <= ru_out_state;
        hold_key   <= ru_out_key;
      end

    assign out_valid = hold_valid;
    assign out_rnd   = hold_rnd;
    assign out_state = hold_state;
    assign out_key   = hold_key;
  end

endmodule
