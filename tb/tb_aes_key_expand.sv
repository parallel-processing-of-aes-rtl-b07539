// tb_aes_key_expand: feeds a new random key (first the FIPS-197 A.1 key) with
// a data word every cycle and checks round key 10, the carried data, the
// 20-cycle latency, and that en=0 stalls the pipeline without loss.
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  blk_t in_key, in_data, out_key, out_data;
  blk_t exp_k [$], exp_d [$];
  int   t_in [$];
  int   n_out = 0, n_stall = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + (en ? 1 : 0);   // counts advancing cycles

  aes_key_expand dut (.clk, .rst_n, .en, .in_valid, .in_key, .in_data, .out_valid, .out_key, .out_data);

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  always @(negedge clk) if (rst_n && en && out_valid) begin
    chk("rk10", out_key, exp_k[n_out]);
    chk("data", out_data, exp_d[n_out]);
    chk("latency", 128'(cyc - t_in[n_out]), 128'(20));
    n_out++;
  end

  initial begin
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1; en = 1;
    for (int n = 0; n < 60; n++) begin
      automatic blk_t k = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      automatic blk_t d = rand128();
      in_valid = 1; in_key = k; in_data = d;
      exp_k.push_back(n == 0 ? 128'hd014f9a8c9ee2589e13f0cc8b6630ca6 : ref_rk(k, 10));
      exp_d.push_back(d);
      t_in.push_back(cyc);
      @(negedge clk);
      if (n % 17 == 5) begin
        en = 0; n_stall++;
        repeat (3) @(negedge clk);
        en = 1;
      end
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    chk("count", 128'(n_out), 128'(60));
    if (n_stall == 0) failures++;
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
