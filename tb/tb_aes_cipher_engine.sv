// tb_aes_cipher_engine: checks two engine shapes on streams of random blocks
// and keys: the default (encryption, nine pipelined round stages), which must
// take a block every cycle with a 40-cycle latency, and a decryption engine
// with three stages looping three times and four Sub-4 units in the final
// round, whose first result must come after 20 + 1 + 3*13 + 3 = 63 cycles.
// Results are compared in order with the reference model.
module tb_aes_cipher_engine;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic e_iv = 0, e_ir, e_ov, d_iv = 0, d_ir, d_ov;
  blk_t e_blk, e_key, e_out, d_blk, d_key, d_out;
  blk_t exp_e [$], exp_d [$];
  int   te [$], td [$];
  int   ne = 0, nd = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  aes_cipher_engine dut_e (.clk, .rst_n, .en, .in_valid(e_iv), .in_ready(e_ir), .in_block(e_blk), .in_key(e_key),
                           .out_valid(e_ov), .out_block(e_out));
  aes_cipher_engine #(.DECRYPT(1'b1), .NSEG(3), .ITER(3), .NSUB(1), .NMIX(1), .FINAL_NSUB(4)) dut_d (
    .clk, .rst_n, .en, .in_valid(d_iv), .in_ready(d_ir), .in_block(d_blk), .in_key(d_key),
    .out_valid(d_ov), .out_block(d_out));

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (e_ov) begin
      chk("enc", e_out, exp_e[ne]);
      chk("enc latency", 128'(cyc - te[ne]), 128'(40));
      ne++;
    end
    if (d_ov) begin
      chk("dec", d_out, exp_d[nd]);
      if (nd == 0) chk("dec latency", 128'(cyc - td[0]), 128'(63));
      nd++;
    end
  end

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 50; n++) begin
        automatic blk_t k = rand128(), p = rand128();
        e_iv = 1; e_blk = p; e_key = k;
        #1 chk("enc always ready", 128'(e_ir), 128'(1));
        exp_e.push_back(ref_encrypt(p, k));
        te.push_back(cyc);
        @(negedge clk);
      end
      for (int n = 0; n < 8; n++) begin
        automatic blk_t k = rand128(), p = rand128();
        d_iv = 1; d_blk = ref_encrypt(p, k); d_key = k;
        #1;
        while (!d_ir) begin @(negedge clk); #1; end
        exp_d.push_back(p);
        td.push_back(cyc);
        @(negedge clk);
        d_iv = 0;
      end
    join
    e_iv = 0; d_iv = 0;
    while (nd < 8) @(negedge clk);
    repeat (50) @(negedge clk);
    chk("enc count", 128'(ne), 128'(50));
    chk("dec count", 128'(nd), 128'(8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
