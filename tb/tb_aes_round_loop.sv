// tb_aes_round_loop: checks a looping round stage (ITER=3) for encryption and
// decryption: the state and key after three rounds, the 13-cycle stage time,
// that in_ready stays low while the stage holds a block, that a finished
// block waits while out_ready is low, and that a new block can enter in the
// cycle the old one leaves.
module tb_aes_round_loop;
  import aes_ref_pkg::*;
  import aes_pkg::rnd_t;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_ready = 0;
  logic e_in_ready, e_out_valid, d_in_ready, d_out_valid;
  rnd_t e_rnd_in, d_rnd_in, e_rnd_out, d_rnd_out;
  blk_t e_st, e_k, d_st, d_k, e_ost, e_okey, d_ost, d_okey;
  int   cyc = 0, n_wait = 0, n_overlap = 0;
  always @(posedge clk) cyc <= cyc + 1;

  aes_round_loop #(.DECRYPT(1'b0), .ITER(3), .NSUB(1), .NMIX(1)) dut_e (
    .clk, .rst_n, .en, .in_valid, .in_ready(e_in_ready), .in_rnd(e_rnd_in), .in_state(e_st), .in_key(e_k),
    .out_valid(e_out_valid), .out_ready, .out_rnd(e_rnd_out), .out_state(e_ost), .out_key(e_okey));
  aes_round_loop #(.DECRYPT(1'b1), .ITER(3), .NSUB(4), .NMIX(4)) dut_d (
    .clk, .rst_n, .en, .in_valid, .in_ready(d_in_ready), .in_rnd(d_rnd_in), .in_state(d_st), .in_key(d_k),
    .out_valid(d_out_valid), .out_ready, .out_rnd(d_rnd_out), .out_state(d_ost), .out_key(d_okey));

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      automatic blk_t key = rand128(), s = rand128();
      automatic int   r0  = 1 + 3 * (n % 3);          // 1, 4, 7
      automatic int   d0  = 10 - 3 * (n % 3);         // 10, 7, 4
      automatic blk_t ee = s, dd = s;
      automatic int   t0;
      for (int r = r0; r < r0 + 3; r++) ee = ref_enc_round(ee, key, r);
      for (int r = d0; r > d0 - 3; r--) dd = ref_dec_round(dd, key, r);
      in_valid = 1;
      e_rnd_in = rnd_t'(r0); e_st = s; e_k = ref_rk(key, r0 - 1);
      d_rnd_in = rnd_t'(d0); d_st = s; d_k = ref_rk(key, d0);
      out_ready = (n > 0);
      #1;
      chk("ready when free", 128'({e_in_ready, d_in_ready}), 128'(2'b11));
      if (n > 0 && e_out_valid) n_overlap++;   // old block leaves as this one enters
      t0 = cyc;
      @(negedge clk);
      in_valid = 0; out_ready = 0;
      while (!e_out_valid) begin
        chk("busy", 128'({e_in_ready, d_in_ready}), 128'(0));
        @(negedge clk);
      end
      chk("stage time", 128'(cyc - t0), 128'(13));
      chk("enc state", e_ost, ee);
      chk("enc key",   e_okey, ref_rk(key, r0 + 2));
      chk("enc rnd",   128'(e_rnd_out), 128'(r0 + 3));
      chk("dec valid", 128'(d_out_valid), 128'(1));
      chk("dec state", d_ost, dd);
      chk("dec key",   d_okey, ref_rk(key, d0 - 3));
      chk("dec rnd",   128'(d_rnd_out), 128'(d0 - 3));
      // a finished block waits while out_ready is low
      if (n % 2 == 1) begin
        repeat (3) @(negedge clk);
        n_wait++;
        chk("waits", 128'({e_out_valid, d_out_valid, e_in_ready, d_in_ready}), 128'(4'b1100));
        chk("held state", e_ost, ee);
      end
    end
    if (n_wait == 0 || n_overlap == 0) begin failures++; $display("FAIL wait/overlap not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
