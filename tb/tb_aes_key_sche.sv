// tb_aes_key_sche: checks Key Sche, forward and inverse, with the word from
// a Key Sub unit: round key r-1 must step to round key r and back, for every
// round of random keys and of the FIPS-197 A.1 key.
module tb_aes_key_sche;
  import aes_ref_pkg::*;
  import aes_pkg::rnd_t;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk_t kf, ki, nf, ni;
  rnd_t rnd;
  logic [31:0] tf, ti;

  aes_key_sub  #(.INVERSE(1'b0)) sub_f (.clk, .en, .key_in(kf), .rnd(rnd), .temp(tf));
  aes_key_sub  #(.INVERSE(1'b1)) sub_i (.clk, .en, .key_in(ki), .rnd(rnd), .temp(ti));
  aes_key_sche #(.INVERSE(1'b0)) dut_f (.clk, .en, .key_in(kf), .temp(tf), .key_out(nf));
  aes_key_sche #(.INVERSE(1'b1)) dut_i (.clk, .en, .key_in(ki), .temp(ti), .key_out(ni));

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    ref_init();
    for (int n = 0; n < 20; n++) begin
      automatic blk_t key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      for (int r = 1; r <= 10; r++) begin
        // cycle 1: Key Sub; cycle 2: Key Sche with the key held
        @(negedge clk); en = 1; kf = ref_rk(key, r - 1); ki = ref_rk(key, r); rnd = rnd_t'(r);
        @(negedge clk);
        @(negedge clk); en = 0;
        chk($sformatf("fwd r%0d", r), nf, ref_rk(key, r));
        chk($sformatf("inv r%0d", r), ni, ref_rk(key, r - 1));
      end
    end
    @(negedge clk); en = 1; kf = 128'h2b7e151628aed2a6abf7158809cf4f3c; rnd = 1;
    @(negedge clk); @(negedge clk); en = 0;
    chk("FIPS A.1 k1", nf, 128'ha0fafe1788542cb123a339392a6c7605);
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
