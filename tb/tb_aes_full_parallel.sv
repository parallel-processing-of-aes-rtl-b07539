// tb_aes_full_parallel: end-to-end test of the Full-parallelism unit with its
// four lanes. Every lane gets a new plaintext/ciphertext pair with its own
// random key every cycle (lane 0 starts with the FIPS-197 C.1 example). Checks
// every result per lane against the reference model, the 40/60-cycle
// latencies, one result per lane per cycle once the pipeline is full, and a
// ctrl=1 hold in the middle of the stream.
module tb_aes_full_parallel;
  import aes_ref_pkg::*;
  localparam int LANES = 4;
  localparam int NBLK  = 70;    // per lane
  localparam int LAT_E = 40;
  localparam int LAT_D = 60;

  logic clk = 0, rst_n = 0, ctrl = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [LANES-1:0] in_valid, in_ready, enc_valid, dec_valid;
  blk_t pt [LANES], ct [LANES], key [LANES], enc_out [LANES], dec_out [LANES];

  aes_full_parallel dut (
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

  blk_t exp_e [LANES][$], exp_d [LANES][$];
  int   t0;
  int   n_enc [LANES], n_dec [LANES];
  int   n_hold = 0, full_rate = 0, hold_start = 1 << 30;

  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < LANES; l++) begin
      if (enc_valid[l]) begin
        chk($sformatf("lane %0d enc %0d", l, n_enc[l]), enc_out[l], exp_e[l][n_enc[l]]);
        if (n_enc[l] == 0) chk("enc latency", 128'(cyc - t0), 128'(LAT_E));
        n_enc[l]++;
      end
      if (dec_valid[l]) begin
        chk($sformatf("lane %0d dec %0d", l, n_dec[l]), dec_out[l], exp_d[l][n_dec[l]]);
        if (n_dec[l] == 0) chk("dec latency", 128'(cyc - t0), 128'(LAT_D));
        n_dec[l]++;
      end
    end
    // once full and before the hold, all four lanes deliver every cycle
    if (cyc > t0 + LAT_D && cyc < hold_start) begin
      chk("4 results per cycle", 128'({enc_valid, dec_valid}), {120'h0, 8'hff});
      full_rate++;
    end
  end

  initial begin
    ref_init();
    in_valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NBLK; n++) begin
      @(negedge clk);
      if (n == NBLK - 3) begin
        // change ctrl away from the sampling edge of the checker
        in_valid = '0;
        @(posedge clk); #1; ctrl = 1; hold_start = cyc;
        repeat (4) begin
          @(negedge clk); #1;
          n_hold++;
          chk("hold: nothing accepted", 128'(in_ready), 128'(0));
          chk("hold: no results", 128'({enc_valid, dec_valid}), 128'(0));
        end
        @(posedge clk); #1; ctrl = 0;
        @(negedge clk);
      end
      for (int l = 0; l < LANES; l++) begin
        automatic blk_t k  = (n == 0 && l == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand128();
        automatic blk_t p  = (n == 0 && l == 0) ? 128'h00112233445566778899aabbccddeeff : rand128();
        automatic blk_t p2 = rand128();
        key[l] = k; pt[l] = p; ct[l] = ref_encrypt(p2, k);
        exp_e[l].push_back(ref_encrypt(p, k));
        exp_d[l].push_back(p2);
      end
      in_valid = '1;
      #1;
      chk("always ready", 128'(in_ready), 128'(4'hf));
      if (n == 0) t0 = cyc;
      @(posedge clk);
    end
    @(negedge clk); in_valid = '0;
    repeat (LAT_D + 5) @(negedge clk);
    for (int l = 0; l < LANES; l++) begin
      chk("enc count", 128'(n_enc[l]), 128'(NBLK));
      chk("dec count", 128'(n_dec[l]), 128'(NBLK));
    end
    if (n_hold == 0 || full_rate == 0) begin failures++; $display("FAIL hold or full rate never seen"); end
    $display("holds=%0d full_rate_cycles=%0d", n_hold, full_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK + LAT_D + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
