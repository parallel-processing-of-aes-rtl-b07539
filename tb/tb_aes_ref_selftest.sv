// tb_aes_ref_selftest: checks the testbench reference model against the
// published FIPS-197 example vectors before it is trusted elsewhere.
module tb_aes_ref_selftest;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(string what, blk_t got, blk_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  initial begin
    ref_init();
    chk("C.1 enc", ref_encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f),
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    chk("C.1 dec", ref_decrypt(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f),
        128'h00112233445566778899aabbccddeeff);
    chk("B enc", ref_encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c),
        128'h3925841d02dc09fbdc118597196a0b32);
    chk("A.1 rk10", ref_rk(128'h2b7e151628aed2a6abf7158809cf4f3c, 10), 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
