// jk_ff_tb: drives every J/K combination from both stored values and checks
// hold, reset, set and toggle, the complementary output and the synchronous
// clear.
module jk_ff_tb;
  logic clk = 0, rst, j, k, q, qn;
  int checks = 0, failures = 0;
  logic [7:0] seen = '0;

  jk_ff dut (.clk, .rst, .j, .k, .q, .qn);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; j = 1; k = 0;
    @(negedge clk);
    check(q == 0 && qn == 1, "clear");
    rst = 0;
    for (int n = 0; n < 200; n++) begin
        logic q0, exp;
        {j, k} = 2'($urandom);
        seen[{j, k, q}] = 1'b1;
        q0 = q;
        exp = (j && k) ? ~q0 : (j ? 1'b1 : (k ? 1'b0 : q0));
        @(negedge clk);
        check(q == exp && qn == ~exp, $sformatf("j=%b k=%b from q=%b", j, k, q0));
    end
    check(&seen, "all eight (J, K, q) cases applied");
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
