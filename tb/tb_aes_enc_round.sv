// tb_aes_enc_round: drives one encryption round unit per shape (Sub-16/Mix-16,
// four Sub-4/Mix-4, and the final round) with a new random state and key
// every cycle and checks state, next round key, round number and the 4-cycle
// (final: 3-cycle) latency against the reference round.
module tb_aes_enc_round;
  import aes_ref_pkg::*;
  import aes_pkg::rnd_t;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  rnd_t in_rnd, in_rnd_f;
  blk_t in_state, in_key, in_key_f;
  logic ov [3];
  rnd_t orn [3];
  blk_t ost [3], oky [3];

  aes_enc_round #(.NSUB(1), .NMIX(1), .FINAL(1'b0)) dut16 (.clk, .rst_n, .en, .in_valid, .in_rnd, .in_state, .in_key,
    .out_valid(ov[0]), .out_rnd(orn[0]), .out_state(ost[0]), .out_key(oky[0]));
  aes_enc_round #(.NSUB(4), .NMIX(4), .FINAL(1'b0)) dut4 (.clk, .rst_n, .en, .in_valid, .in_rnd, .in_state, .in_key,
    .out_valid(ov[1]), .out_rnd(orn[1]), .out_state(ost[1]), .out_key(oky[1]));
  aes_enc_round #(.NSUB(1), .NMIX(1), .FINAL(1'b1)) dutf (.clk, .rst_n, .en, .in_valid, .in_rnd(in_rnd_f), .in_state, .in_key(in_key_f),
    .out_valid(ov[2]), .out_rnd(orn[2]), .out_state(ost[2]), .out_key(oky[2]));

  // expected results, queued by issue cycle
  typedef struct { int cyc; blk_t st, st_f, k, k_f; int r; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // checker: sample outputs just before each rising edge
  int seen [3];
  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 3; u++) if (ov[u]) begin
      automatic int lat = (u == 2) ? 3 : 4;
      automatic exp_t e = q[seen[u]];
      chk($sformatf("latency u%0d", u), 128'(cyc - e.cyc), 128'(lat));
      chk($sformatf("state u%0d", u), ost[u], (u == 2) ? e.st_f : e.st);
      chk($sformatf("key u%0d", u),   oky[u], (u == 2) ? e.k_f : e.k);
      chk($sformatf("rnd u%0d", u),   128'(orn[u]), 128'((u == 2) ? 11 : e.r + 1));
      seen[u]++;
    end
  end

  initial begin
    ref_init();
    in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    for (int n = 0; n < 40; n++) begin
      automatic blk_t key = rand128();
      automatic int   r   = 1 + (n % 9);
      automatic blk_t s   = rand128();
      @(negedge clk);
      in_valid = 1; in_rnd = rnd_t'(r); in_rnd_f = rnd_t'(10);
      in_state = s; in_key = ref_rk(key, r - 1); in_key_f = ref_rk(key, 9);
      q.push_back('{cyc, ref_enc_round(s, key, r), ref_enc_round(s, key, 10),
                    ref_rk(key, r), ref_rk(key, 10), r});
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    chk("all out u0", 128'(seen[0]), 128'(40));
    chk("all out u1", 128'(seen[1]), 128'(40));
    chk("all out u2", 128'(seen[2]), 128'(40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
