// asap_fifo: single-clock first-in first-out buffer for one input link of
// the processor array, WIDTH bits wide and DEPTH entries deep.
//
// A circular buffer with read and write pointers one bit wider than the
// address, so full and empty are told apart by the extra bit. rd_data always
// shows the oldest entry (first-word fall-through); rd_en removes it and
// wr_en appends wr_data, both in the same cycle if wanted. Writing when full
// or reading when empty is ignored and flagged by an assertion. DEPTH, the
// single clock and the fall-through behaviour are this design's choices; the
// document only names the FIFO inputs and outputs.
module asap_fifo #(
  parameter int WIDTH = 128,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end

  always_ff @(posedge clk)
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("asap_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("asap_fifo: read while empty");

endmodule
