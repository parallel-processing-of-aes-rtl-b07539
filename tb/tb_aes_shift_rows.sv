// tb_aes_shift_rows: checks Shiftrows and Inverse Shiftrows against the
// reference on the FIPS-197 round-1 example and random states, that the two
// are inverses, and the one-cycle latency with en.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk_t din, dout_f, dout_i, dout_back;

  aes_shift_rows #(.INVERSE(1'b0)) dut_f (.clk, .en, .din(din), .dout(dout_f));
  aes_shift_rows #(.INVERSE(1'b1)) dut_i (.clk, .en, .din(din), .dout(dout_i));
  aes_shift_rows #(.INVERSE(1'b1)) dut_b (.clk, .en, .din(dout_f), .dout(dout_back));

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    ref_init();
    @(negedge clk); din = 128'h00112233445566778899aabbccddeeff; en = 1;
    @(negedge clk);
    chk("column-major vector", dout_f, 128'h0055aaff4499ee3388dd2277cc1166bb);
    chk("inverse vector", dout_i, 128'h00ddaa774411eebb885522ffcc996633);
    // FIPS-197 Appendix B, round 1: after SubBytes / after ShiftRows
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    @(negedge clk);
    chk("FIPS B r1", dout_f, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int n = 0; n < 50; n++) begin
      automatic blk_t v = rand128();
      din = v;
      @(negedge clk);
      chk("rand fwd", dout_f, ref_shift(v, 0));
      chk("rand inv", dout_i, ref_shift(v, 1));
      @(negedge clk);
      chk("round trip", dout_back, v);
    end
    begin
      automatic blk_t held = dout_f;
      en = 0; din = ~din;
      @(negedge clk);
      chk("hold", dout_f, held);
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
