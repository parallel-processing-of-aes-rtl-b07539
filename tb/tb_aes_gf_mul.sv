// tb_aes_gf_mul: checks the GF(2^8) multiplier on {92}x{33}={93}, on the
// FIPS-197 example {57}x{83}={c1}, and on all 65536 operand pairs against
// the reference carry-less multiply-and-reduce.
module tb_aes_gf_mul;
  import aes_ref_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] a, b, p;

  aes_gf_mul dut (.clk, .en, .din(a), .mixmat(b), .dout(p));

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    @(negedge clk); en = 1; a = 8'b10010010; b = 8'b00110011;
    @(negedge clk); chk("92x33", p, 8'b10010011);
    a = 8'h57; b = 8'h83;
    @(negedge clk); chk("57x83", p, 8'hc1);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        @(negedge clk);
        chk("all", p, rmul(8'(i), 8'(j)));
      end
    en = 0; a = 8'h01; b = 8'h01;
    @(negedge clk); chk("hold", p, rmul(8'hff, 8'hff));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
