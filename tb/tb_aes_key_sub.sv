// tb_aes_key_sub: checks the Key Sub word, forward and inverse, for every
// round of random keys: paired with the reference schedule, the forward word
// must equal w[4r] ^ w[4r-4] and the inverse word (taken from key r) the same.
module tb_aes_key_sub;
  import aes_ref_pkg::*;
  import aes_pkg::rnd_t;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk_t kf, ki;
  rnd_t rnd;
  logic [31:0] tf, ti;

  aes_key_sub #(.INVERSE(1'b0)) dut_f (.clk, .en, .key_in(kf), .rnd(rnd), .temp(tf));
  aes_key_sub #(.INVERSE(1'b1)) dut_i (.clk, .en, .key_in(ki), .rnd(rnd), .temp(ti));

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    ref_init();
    for (int n = 0; n < 20; n++) begin
      automatic blk_t key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      for (int r = 1; r <= 10; r++) begin
        automatic blk_t prev = ref_rk(key, r - 1), cur = ref_rk(key, r);
        @(negedge clk); en = 1; kf = prev; ki = cur; rnd = rnd_t'(r);
        @(negedge clk); en = 0;
        chk($sformatf("fwd r%0d", r), tf, cur[127:96] ^ prev[127:96]);
        chk($sformatf("inv r%0d", r), ti, cur[127:96] ^ prev[127:96]);
      end
    end
    // FIPS-197 A.1: for w[4], SubWord(RotWord(09cf4f3c)) = 8a84eb01, then ^ Rcon 01000000
    @(negedge clk); en = 1; kf = 128'h2b7e151628aed2a6abf7158809cf4f3c; rnd = 1;
    @(negedge clk); en = 0;
    chk("FIPS A.1", tf, 32'h8b84eb01);
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
