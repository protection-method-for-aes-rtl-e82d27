// concurrent_fault_check_tb: checks the duplicated counter and its Fault
// output at W = 5.
//  - control signals agreeing (both 0, both 1): no fault, the gate opens
//    after 2^(W-1) clocks with both at 1
//  - Load Key and ShiftDR disagreeing: fault at once
//  - a flip-flop of either counter flipped between clock edges (a glitch):
//    fault while both controls are 1, none while both are 0
//  - random glitches against a model of the two counters in this testbench
module concurrent_fault_check_tb;
  localparam int W = 5;
  logic clk = 0, rst, load_key, shift_dr, gate, fault;
  logic [W-1:0] cnt_a, cnt_b;
  int checks = 0, failures = 0, detected = 0;

  concurrent_fault_check #(.W(W)) dut (.clk, .rst, .load_key, .shift_dr, .gate, .fault,
                                       .cnt_a, .cnt_b);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flip one bit of counter B (sel = 0) or A (sel = 1), as a glitch would
  task automatic glitch(input int sel, input int b);
    case ({sel[0], 3'(b)})
      4'b0000: dut.u_cnt_b.g_bit[0].u_ff.q = ~dut.u_cnt_b.g_bit[0].u_ff.q;
      4'b0001: dut.u_cnt_b.g_bit[1].u_ff.q = ~dut.u_cnt_b.g_bit[1].u_ff.q;
      4'b0010: dut.u_cnt_b.g_bit[2].u_ff.q = ~dut.u_cnt_b.g_bit[2].u_ff.q;
      4'b0011: dut.u_cnt_b.g_bit[3].u_ff.q = ~dut.u_cnt_b.g_bit[3].u_ff.q;
      4'b0100: dut.u_cnt_b.g_bit[4].u_ff.q = ~dut.u_cnt_b.g_bit[4].u_ff.q;
      4'b1000: dut.u_cnt_a.g_bit[0].u_ff.q = ~dut.u_cnt_a.g_bit[0].u_ff.q;
      4'b1001: dut.u_cnt_a.g_bit[1].u_ff.q = ~dut.u_cnt_a.g_bit[1].u_ff.q;
      4'b1010: dut.u_cnt_a.g_bit[2].u_ff.q = ~dut.u_cnt_a.g_bit[2].u_ff.q;
      4'b1011: dut.u_cnt_a.g_bit[3].u_ff.q = ~dut.u_cnt_a.g_bit[3].u_ff.q;
      default: dut.u_cnt_a.g_bit[4].u_ff.q = ~dut.u_cnt_a.g_bit[4].u_ff.q;
    endcase
  endtask

  initial begin
    rst = 1; load_key = 0; shift_dr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(!fault && !gate, "idle: no fault, gate closed");
    load_key = 1; #1 check(fault, "Load Key without ShiftDR");
    load_key = 0; shift_dr = 1; #1 check(fault, "ShiftDR without Load Key");
    shift_dr = 0; #1 check(!fault, "both 0");
    @(negedge clk); load_key = 1; shift_dr = 1;
    for (int i = 1; i <= 20; i++) begin
      @(negedge clk);
      check(!fault, "both 1, counters equal");
      check(gate == (i >= (1 << (W - 1))), $sformatf("gate after %0d clocks", i));
    end
    // glitch on counter B with both controls at 1
    glitch(0, 2);
    #1 check(fault, "glitch on counter B detected");
    @(negedge clk); load_key = 0; shift_dr = 0;
    #1 check(!fault, "no fault reported outside scan");
    repeat (W + 1) @(negedge clk);
    check(cnt_a == 0 && cnt_b == 0, "both counters shifted empty");
    // random: single glitch in either counter at a random point of a scan
    for (int t = 0; t < 200; t++) begin
      int when, sel, b;
      when = $urandom % 40; sel = $urandom % 2; b = $urandom % W;
      @(negedge clk); load_key = 1; shift_dr = 1;
      repeat (when) @(negedge clk);
      check(!fault, "before glitch");
      glitch(sel, b);
      #1 check(fault, $sformatf("glitch counter %0d bit %0d after %0d", sel, b, when));
      if (fault) detected++;
      @(negedge clk); load_key = 0; shift_dr = 0;
      repeat (W + 1) @(negedge clk);
    end
    $display("glitches detected: %0d", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
