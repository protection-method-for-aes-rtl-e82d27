// aes_key_expand_tb: checks the key-schedule step against the round keys
// printed in FIPS-197 (Appendix A.1 for key 2b7e1516..., Appendix C.1 for
// key 00010203...). The block is chained ten times from the cipher key.
module aes_key_expand_tb;
  import aes_pkg::*;

  block_t     rk_in, rk_out;
  logic [3:0] round;
  int checks = 0, failures = 0;

  aes_key_expand dut (.rk_in, .round, .rk_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  block_t a1 [11] = '{
    128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6};

  initial begin
    automatic block_t k = a1[0];
    for (int r = 1; r <= 10; r++) begin
      rk_in = k; round = 4'(r);
      #1 check(rk_out == a1[r], $sformatf("A.1 round key %0d", r));
      k = rk_out;
    end
    k = 128'h000102030405060708090a0b0c0d0e0f;
    for (int r = 1; r <= 10; r++) begin
      rk_in = k; round = 4'(r);
      #1 k = rk_out;
    end
    check(k == 128'h13111d7fe3944a17f307a78b4d2b30c5, "C.1 round key 10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
