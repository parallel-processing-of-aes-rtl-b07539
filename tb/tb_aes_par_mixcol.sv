// tb_aes_par_mixcol: end-to-end test of aes_par_mixcol (one round stage with four Sub-4 and Mix-4 units, looping nine times). Sends 20
// plaintext/ciphertext pairs, each with its own random key (the first is the
// FIPS-197 C.1 example), as fast as the unit accepts them, with a stretch of
// ctrl=1 hold in the middle. Checks every ciphertext and plaintext against
// the reference model, in order; the latency of the first block
// (encryption 41 cycles, decryption 61); the steady-state spacing of
// encryption results while the input never waits (37 cycle(s), the
// throughput); and that a hold freezes the outputs.
module tb_aes_par_mixcol;
  import aes_ref_pkg::*;
  localparam int NBLK   = 20;
  localparam int LAT_E  = 41;
  localparam int LAT_D  = 61;
  localparam int GAP    = 37;

  logic clk = 0, rst_n = 0, ctrl = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, enc_valid, dec_valid;
  blk_t pt, ct, key, enc_out, dec_out;

  aes_par_mixcol dut (
    .clk, .rst_n, .ctrl, .in_valid, .in_ready,
    .input_encryption(pt), .input_decryption(ct), .input_key(key),
    .output_encryption(enc_out), .enc_valid, .output_decryption(dec_out), .dec_valid
  );

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  blk_t exp_e [$], exp_d [$];
  int   t_acc [$];
  int   n_enc = 0, n_dec = 0, n_hold = 0, gap_seen = 0;
  int   t_enc_last = 0, hold_start = 1 << 30;

  // output checker, sampled between edges
  always @(negedge clk) if (rst_n) begin
    if (enc_valid) begin
      chk($sformatf("enc %0d", n_enc), enc_out, exp_e[n_enc]);
      if (n_enc == 0) chk("enc latency", 128'(cyc - t_acc[0]), 128'(LAT_E));
      // results that left before the hold and after the pipeline filled
      if (n_enc >= 2 && cyc < hold_start) begin
        chk("result spacing", 128'(cyc - t_enc_last), 128'(GAP));
        gap_seen++;
      end
      t_enc_last = cyc;
      n_enc++;
    end
    if (dec_valid) begin
      chk($sformatf("dec %0d", n_dec), dec_out, exp_d[n_dec]);
      if (n_dec == 0) chk("dec latency", 128'(cyc - t_acc[0]), 128'(LAT_D));
      n_dec++;
    end
  end

  initial begin
    ref_init();
    in_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NBLK; n++) begin
      automatic blk_t k  = (n == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();
      automatic blk_t p  = (n == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
      automatic blk_t p2 = rand128();
      @(negedge clk);
      // hold in the middle of the stream
      if (n == NBLK - 4) begin
        automatic blk_t e_held, d_held;
        // change ctrl away from the sampling edge of the checker
        in_valid = 0;
        @(posedge clk); #1; ctrl = 1; in_valid = 1; hold_start = cyc;
        e_held = enc_out; d_held = dec_out;
        repeat (5) begin
          @(negedge clk);
          n_hold++;
          chk("hold: nothing accepted", 128'(in_ready), 128'(0));
          chk("hold: enc frozen", enc_out, e_held);
          chk("hold: dec frozen", dec_out, d_held);
        end
        @(posedge clk); #1; ctrl = 0;
        @(negedge clk);
      end
      in_valid = 1; key = k; pt = p; ct = ref_encrypt(p2, k);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      exp_e.push_back(ref_encrypt(p, k));
      exp_d.push_back(p2);
      t_acc.push_back(cyc);
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    while (n_dec < NBLK) @(negedge clk);
    repeat (5) @(negedge clk);
    chk("enc count", 128'(n_enc), 128'(NBLK));
    chk("dec count", 128'(n_dec), 128'(NBLK));
    if (n_hold == 0 || gap_seen == 0) begin failures++; $display("FAIL hold or spacing never exercised"); end
    $display("holds=%0d spacing_checks=%0d", n_hold, gap_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * (GAP + 2) + LAT_D + 200) @(posedge clk);
    failures++;
    $display("watchdog: enc=%0d dec=%0d", n_enc, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
