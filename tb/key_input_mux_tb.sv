// key_input_mux_tb: for every combination of the three Load Key copies and
// random keys, the multiplexer must pass the test key when two or more
// copies are 1 and the user key otherwise; a single forced copy must not
// switch the key.
module key_input_mux_tb;
  import aes_pkg::*;
  logic [2:0] lk_copies;
  block_t user_key, test_key, key_out;
  int checks = 0, failures = 0;

  key_input_mux dut (.lk_copies, .user_key, .test_key, .key_out);

  function automatic block_t rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int v = 0; v < 8; v++) begin
        int ones;
        lk_copies = 3'(v);
        user_key = rnd128();
        test_key = rnd128();
        ones = int'(lk_copies[0]) + int'(lk_copies[1]) + int'(lk_copies[2]);
        #1;
        checks++;
        if (key_out !== ((ones >= 2) ? test_key : user_key)) begin
          failures++;
          $display("FAIL: copies=%b", lk_copies);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
