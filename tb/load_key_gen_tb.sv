// load_key_gen_tb: exhaustive test of the Load Key generator. Load Key and
// each of its three copies must be 1 exactly when ShiftDR = 1, Enable = 1 and
// Select = 0 (a data register is being shifted).
module load_key_gen_tb;
  logic shift_dr, enable, select, load_key;
  logic [2:0] lk_copies;
  int checks = 0, failures = 0;

  load_key_gen dut (.shift_dr, .enable, .select, .lk_copies, .load_key);

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {shift_dr, enable, select} = 3'(v);
      exp = (v == 3'b110);
      #1;
      checks++;
      if (load_key !== exp || lk_copies !== {3{exp}}) begin
        failures++;
        $display("FAIL: sdr=%b en=%b sel=%b lk=%b copies=%b", shift_dr, enable, select,
                 load_key, lk_copies);
      end
    end
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
