// gating_counter_tb: checks the JK gating counter at W = 5 and at its
// default width against a cycle model kept in this testbench:
//   en = 1: count up by one until the MSB is set, then hold
//   en = 0: shift left by one with en (0) entering bit 0
// It checks that the gate (MSB) opens after exactly 2^(W-1) enabled clocks,
// stays open while enabled, closes one clock after en falls, that the
// counter is 0 again W clocks later, and random enable patterns.
module gating_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en;

  always #5 clk = ~clk;

  localparam int WS = 5;
  localparam int WD = 11;
  logic [WS-1:0] cnt_s;
  logic [WD-1:0] cnt_d;
  logic gate_s, gate_d;

  gating_counter #(.W(WS)) dut_s (.clk, .rst, .en, .cnt(cnt_s), .gate(gate_s));
  gating_counter           dut_d (.clk, .rst, .en, .cnt(cnt_d), .gate(gate_d));

  logic [WS-1:0] m_s;
  logic [WD-1:0] m_d;
  int open_at_s, open_at_d, enabled;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input logic e);
    @(negedge clk);
    en = e;
    @(posedge clk);
    if (e) begin
      if (!m_s[WS-1]) m_s++;
      if (!m_d[WD-1]) m_d++;
      enabled++;
    end else begin
      m_s = {m_s[WS-2:0], 1'b0};
      m_d = {m_d[WD-2:0], 1'b0};
      enabled = 0;
    end
    #1;
    check(cnt_s == m_s && gate_s == m_s[WS-1], $sformatf("W=%0d cnt %0d exp %0d", WS, cnt_s, m_s));
    check(cnt_d == m_d && gate_d == m_d[WD-1], $sformatf("W=%0d cnt %0d exp %0d", WD, cnt_d, m_d));
    if (gate_s && open_at_s < 0) open_at_s = enabled;
    if (gate_d && open_at_d < 0) open_at_d = enabled;
  endtask

  initial begin
    rst = 1; en = 0; m_s = '0; m_d = '0; enabled = 0; open_at_s = -1; open_at_d = -1;
    repeat (2) @(posedge clk);
    #1 check(cnt_s == 0 && cnt_d == 0, "reset clears");
    @(negedge clk) rst = 0;
    // long enable: both gates must open at 2^(W-1)
    for (int i = 0; i < 1100; i++) step(1);
    check(open_at_s == (1 << (WS - 1)), $sformatf("W=%0d gate opened after %0d", WS, open_at_s));
    check(open_at_d == (1 << (WD - 1)), $sformatf("W=%0d gate opened after %0d", WD, open_at_d));
    check(gate_s && gate_d, "gate held open");
    // disable: gate shuts next clock, counter empty after W clocks
    step(0);
    check(!gate_s && !gate_d, "gate closes one clock after enable falls");
    for (int i = 1; i < WD; i++) step(0);
    check(cnt_s == 0 && cnt_d == 0, "counter cleared by shifting");
    // random enable patterns
    for (int i = 0; i < 3000; i++) step(($urandom % 8) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
