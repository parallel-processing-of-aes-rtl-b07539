// tb_aes_add_round_key: checks the 128-bit Addroundkey XOR on the example
// 1216...4616 ^ 5135...5184 and on random pairs, plus hold. The expected
// example result is the XOR of the two inputs, 4323d730...02c90101f92b1792.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk_t a, b, y;

  aes_add_round_key dut (.clk, .en, .din1(a), .din2(b), .dout(y));

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    @(negedge clk); en = 1;
    a = 128'h12165351438351843651894561684616;
    b = 128'h51358461588984153498884498435184;
    @(negedge clk);
    chk("example", y, 128'h4323d7301b0ad59102c90101f92b1792);
    for (int n = 0; n < 100; n++) begin
      automatic blk_t u = rand128(), v = rand128();
      a = u; b = v;
      @(negedge clk);
      // bytewise, independent of the vector XOR in the unit
      for (int i = 0; i < 16; i++)
        chk("rand byte", {120'h0, y[8*i +: 8]}, {120'h0, u[8*i +: 8] ^ v[8*i +: 8]});
    end
    begin
      automatic blk_t held = y;
      en = 0; a = ~a;
      @(negedge clk);
      chk("hold", y, held);
    end
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
