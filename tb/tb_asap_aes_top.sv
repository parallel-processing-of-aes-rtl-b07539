// tb_asap_aes_top: end-to-end test of the whole system at its default
// parameters. Data blocks and keys are written into the two input FIFOs in
// bursts larger than the FIFOs, under each value of inst_in in turn
// (0, 1, 2, 3, then 0 again), switching while blocks are still in flight.
// The ciphertext presented on input_decryption always matches the key at the
// head of FIFO 2. Every encryption and decryption result is compared, in
// order, with the reference model; the basic core beside the array is run at
// the same time. Counted, and required to happen at least once: pairs popped
// under each implementation, blocks sent to each full-parallel lane, a full
// FIFO, cycles held back while a switch drains, cycles held by ctrl, and
// basic-core results.
module tb_asap_aes_top;
  import aes_ref_pkg::*;
  localparam int BURST = 14;

  logic clk = 0, rst_n = 0, ctrl = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] inst_in = 0;
  logic       i1 = 0, i2 = 0;
  blk_t       fifo_in1 = '0, fifo_in2 = '0, input_decryption = '0;
  blk_t       f1, f2, output_encryption, output_decryption;
  logic       fifo1_full, fifo2_full, enc_valid, dec_valid;
  logic       core_ctrl = 0, core_in_valid = 0, core_in_ready, core_enc_valid, core_dec_valid;
  blk_t       core_pt = '0, core_ct = '0, core_key = '0, core_enc, core_dec;

  asap_aes_top dut (
    .clk, .rst_n, .ctrl, .inst_in, .i1, .fifo_in1, .i2, .fifo_in2, .f1, .f2,
    .fifo1_full, .fifo2_full, .input_decryption,
    .output_encryption, .enc_valid, .output_decryption, .dec_valid,
    .core_ctrl, .core_in_valid, .core_in_ready,
    .core_input_encryption(core_pt), .core_input_decryption(core_ct), .core_input_key(core_key),
    .core_output_encryption(core_enc), .core_enc_valid, .core_output_decryption(core_dec), .core_dec_valid
  );

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // what the FIFOs hold, and what each popped pair must produce
  blk_t q_pt [$], q_key [$], q_ct [$], q_p2 [$];
  blk_t exp_e [$], exp_d [$];
  int   n_pop [4], n_lane [4];
  int   n_full = 0, n_drain = 0, n_hold = 0, n_e = 0, n_d = 0;
  blk_t core_exp_e [$], core_exp_d [$];
  int   n_ce = 0, n_cd = 0;

  // pop bookkeeping, just before each rising edge; the ciphertext offered
  // is always the one made with the key at the head of FIFO 2
  always @(negedge clk) if (rst_n) begin
    input_decryption = (q_ct.size() > 0) ? q_ct[0] : '0;
    #1;
    if (dut.pop) begin
      chk("f1 is head", f1, q_pt[0]);
      chk("f2 is head", f2, q_key[0]);
      exp_e.push_back(ref_encrypt(q_pt[0], q_key[0]));
      exp_d.push_back(q_p2[0]);
      n_pop[dut.active]++;
      if (dut.active == 0) n_lane[dut.lane]++;
      @(posedge clk);
      void'(q_pt.pop_front()); void'(q_key.pop_front());
      void'(q_ct.pop_front()); void'(q_p2.pop_front());
    end
  end

  // result checker, after the inputs of the cycle have settled
  always @(negedge clk) if (rst_n) begin
    #2;
    if (enc_valid) begin chk($sformatf("enc %0d", n_e), output_encryption, exp_e[n_e]); n_e++; end
    if (dec_valid) begin chk($sformatf("dec %0d", n_d), output_decryption, exp_d[n_d]); n_d++; end
    if (core_enc_valid) begin chk("core enc", core_enc, core_exp_e[n_ce]); n_ce++; end
    if (core_dec_valid) begin chk("core dec", core_dec, core_exp_d[n_cd]); n_cd++; end
    if (fifo1_full && fifo2_full) n_full++;
    if (dut.switching && dut.in_flight != 0) n_drain++;
    if (ctrl) n_hold++;
  end

  task automatic push_burst(int n);
    for (int j = 0; j < n; j++) begin
      automatic blk_t k = rand128(), p = rand128(), p2 = rand128();
      @(negedge clk);
      while (fifo1_full || fifo2_full) begin i1 = 0; i2 = 0; @(negedge clk); end
      i1 = 1; i2 = 1; fifo_in1 = p; fifo_in2 = k;
      q_pt.push_back(p); q_key.push_back(k); q_p2.push_back(p2); q_ct.push_back(ref_encrypt(p2, k));
    end
    @(negedge clk); i1 = 0; i2 = 0;
  endtask

  int total = 0;
  initial begin
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // basic core: a few blocks alongside
    fork
      for (int j = 0; j < 3; j++) begin
        automatic blk_t k = rand128(), p = rand128(), p2 = rand128();
        @(negedge clk);
        core_in_valid = 1; core_pt = p; core_key = k; core_ct = ref_encrypt(p2, k);
        #1;
        while (!core_in_ready) begin @(negedge clk); #1; end
        core_exp_e.push_back(ref_encrypt(p, k)); core_exp_d.push_back(p2);
        @(negedge clk); core_in_valid = 0;
      end
    join_none
    for (int m = 0; m < 5; m++) begin
      @(negedge clk);
      inst_in = (m == 4) ? 2'd0 : 2'(m);
      push_burst(BURST);
      total += BURST;
      if (m == 1) begin
        // hold the array for a while
        @(negedge clk); ctrl = 1;
        repeat (6) @(negedge clk);
        ctrl = 0;
      end
      // switch as soon as the FIFOs are empty, with blocks still in flight
      while (q_pt.size() > 0) @(negedge clk);
    end
    while (n_d < total || n_cd < 3) @(negedge clk);
    repeat (10) @(negedge clk);
    chk("enc results", 128'(n_e), 128'(total));
    chk("dec results", 128'(n_d), 128'(total));
    for (int m = 0; m < 4; m++) if (n_pop[m] == 0) begin failures++; $display("FAIL implementation %0d never used", m); end
    for (int l = 0; l < 4; l++) if (n_lane[l] == 0) begin failures++; $display("FAIL lane %0d never used", l); end
    if (n_full == 0)  begin failures++; $display("FAIL FIFOs never full"); end
    if (n_drain == 0) begin failures++; $display("FAIL no switch drain"); end
    if (n_hold == 0)  begin failures++; $display("FAIL no hold"); end
    if (n_cd == 0)    begin failures++; $display("FAIL basic core idle"); end
    $display("pops per implementation %0d %0d %0d %0d, lanes %0d %0d %0d %0d, full=%0d drain=%0d hold=%0d core=%0d",
             n_pop[0], n_pop[1], n_pop[2], n_pop[3], n_lane[0], n_lane[1], n_lane[2], n_lane[3],
             n_full, n_drain, n_hold, n_cd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: enc=%0d dec=%0d", n_e, n_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
