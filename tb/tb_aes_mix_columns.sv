// tb_aes_mix_columns: checks Mixcolumns (Mix-16 and Mix-4) and Inverse
// Mixcolumns against the reference on the FIPS-197 round-1 example, on
// random states, and that inverse after forward gives the input back.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  blk_t din, dout_f, dout_i, dout_back;
  logic [31:0] din4, dout4;

  aes_mix_columns #(.NCOLS(4), .INVERSE(1'b0)) dut_f (.clk, .en, .din(din), .dout(dout_f));
  aes_mix_columns #(.NCOLS(4), .INVERSE(1'b1)) dut_i (.clk, .en, .din(din), .dout(dout_i));
  aes_mix_columns #(.NCOLS(4), .INVERSE(1'b1)) dut_b (.clk, .en, .din(dout_f), .dout(dout_back));
  aes_mix_columns #(.NCOLS(1), .INVERSE(1'b0)) dut_4 (.clk, .en, .din(din4), .dout(dout4));

  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    ref_init();
    @(negedge clk); en = 1;
    din  = 128'hd4bf5d30e0b452aeb84111f11e2798e5;   // FIPS-197 App. B round 1
    din4 = 32'hdb135345;                           // well-known column example
    @(negedge clk);
    chk("FIPS B r1", dout_f, 128'h046681e5e0cb199a48f8d37a2806264c);
    chk("column", {96'h0, dout4}, {96'h0, 32'h8e4da1bc});
    for (int n = 0; n < 50; n++) begin
      automatic blk_t v = rand128();
      din = v; din4 = v[31:0];
      @(negedge clk);
      chk("rand fwd", dout_f, ref_mix(v, 0));
      chk("rand inv", dout_i, ref_mix(v, 1));
      chk("rand mix4", {96'h0, dout4}, {96'h0, ref_mix(v, 0)[31:0]});
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
