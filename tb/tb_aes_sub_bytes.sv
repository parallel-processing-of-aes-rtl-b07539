// tb_aes_sub_bytes: checks the Substitution unit (Sub-16), its inverse and the
// one-column Sub-4 form against the reference S-box for all 256 byte values,
// the example of the S-box table ({53} -> {ed}) and the 0011..ff vector, and
// checks the one-cycle latency and that en=0 holds the output.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  blk_t  din, dout_f, dout_i;
  logic [31:0] din4, dout4;

  aes_sub_bytes #(.NBYTES(16), .INVERSE(1'b0)) dut_f (.clk, .en, .din(din), .dout(dout_f));
  aes_sub_bytes #(.NBYTES(16), .INVERSE(1'b1)) dut_i (.clk, .en, .din(din), .dout(dout_i));
  aes_sub_bytes #(.NBYTES(4),  .INVERSE(1'b0)) dut_4 (.clk, .en, .din(din4), .dout(dout4));

  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic apply(blk_t d, logic [31:0] d4);
    @(negedge clk); din = d; din4 = d4; en = 1;
    @(negedge clk); en = 0;
  endtask

  initial begin
    ref_init();
    apply(128'h00112233445566778899aabbccddeeff, 32'h53535353);
    chk("fig vector", dout_f, 128'h638293c31bfc33f5c4eeacea4bc12816);
    chk("53->ed", {96'h0, dout4}, {96'h0, 32'hedededed});
    chk("inverse of vector", dout_i, ref_sub(128'h00112233445566778899aabbccddeeff, 1));
    for (int b = 0; b < 256; b += 16) begin
      blk_t v;
      for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = 8'(b + i);
      apply(v, {8'(b), 8'(b+1), 8'(b+2), 8'(b+3)});
      for (int i = 0; i < 16; i++) begin
        chk($sformatf("sbox %02x", b+i), {120'h0, dout_f[127 - 8*i -: 8]}, {120'h0, sb[b+i]});
        chk($sformatf("inv sbox %02x", b+i), {120'h0, dout_i[127 - 8*i -: 8]}, {120'h0, isb[b+i]});
      end
      chk("sub4", {96'h0, dout4}, {96'h0, sb[b], sb[b+1], sb[b+2], sb[b+3]});
    end
    // en low: output holds
    @(negedge clk); din = '0; en = 0;
    @(negedge clk);
    chk("hold", dout_f, ref_sub({8'hf0, 8'hf1, 8'hf2, 8'hf3, 8'hf4, 8'hf5, 8'hf6, 8'hf7,
                                 8'hf8, 8'hf9, 8'hfa, 8'hfb, 8'hfc, 8'hfd, 8'hfe, 8'hff}, 0));
    // latency: one cycle
    @(negedge clk); din = '0; en = 1;
    @(posedge clk); #1;
    chk("latency 1", dout_f, {16{8'h63}});
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
