// jtag_tap_ctrl_tb: checks the TAP controller against a reference model of
// the IEEE 1149.1 state graph kept in this testbench as a table indexed by
// its own state numbering (0 Test-Logic-Reset .. 15 Update-IR). After a
// directed walk through both columns, a long random TMS sequence is applied;
// after every clock the state and all nine control outputs are compared,
// and tdo is checked to repeat tdi one clock later while in Shift-DR.
// trst_n is checked to force Test-Logic-Reset asynchronously.
module jtag_tap_ctrl_tb;
  import jtag_pkg::*;

  logic clk = 0, trst_n, tms, tdi, tdo;
  tap_state_t state;
  tap_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  jtag_tap_ctrl dut (.tck(clk), .trst_n, .tms, .tdi, .tdo, .state, .ctrl);

  always #5 clk = ~clk;

  // reference: 0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR 5 Ex1DR 6 PauseDR 7 Ex2DR
  // 8 UpdDR 9 SelIR 10 CapIR 11 ShIR 12 Ex1IR 13 PauseIR 14 Ex2IR 15 UpdIR
  int nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  tap_state_t enc [16] = '{TEST_LOGIC_RESET, RUN_TEST_IDLE, SELECT_DR_SCAN, CAPTURE_DR,
    SHIFT_DR, EXIT1_DR, PAUSE_DR, EXIT2_DR, UPDATE_DR, SELECT_IR_SCAN, CAPTURE_IR,
    SHIFT_IR, EXIT1_IR, PAUSE_IR, EXIT2_IR, UPDATE_IR};
  int ref_s;
  int visits [16];

  task automatic compare();
    tap_ctrl_t e;
    e.clock_dr  = (ref_s == 3 || ref_s == 4);
    e.shift_dr  = (ref_s == 4);
    e.update_dr = (ref_s == 8);
    e.reset_n   = (ref_s != 0);
    e.select    = (ref_s >= 9);
    e.clock_ir  = (ref_s == 10 || ref_s == 11);
    e.shift_ir  = (ref_s == 11);
    e.update_ir = (ref_s == 15);
    e.enable    = (ref_s == 4 || ref_s == 11);
    checks++;
    if (state != enc[ref_s] || ctrl != e) begin
      failures++;
      $display("FAIL: ref state %0d, dut %s ctrl %b exp %b", ref_s, state.name(), ctrl, e);
    end
    visits[ref_s]++;
  endtask

  task automatic step(input logic m);
    @(negedge clk);
    tms = m;
    tdi = 1'($urandom);
    @(posedge clk);
    ref_s = m ? nxt1[ref_s] : nxt0[ref_s];
    #1 compare();
  endtask

  initial begin
    trst_n = 0; tms = 1; tdi = 0;
    ref_s = 0;
    #12 trst_n = 1;
    #1 compare();
    // directed: to Shift-DR, shift some bits checking TDO, then the IR column
    step(0); step(1); step(0); step(0);           // RTI, SelDR, CapDR, ShDR
    for (int i = 0; i < 8; i++) begin
      logic sent;
      @(negedge clk);
      tms = 0; tdi = 1'($urandom);
      sent = tdi;
      @(posedge clk); ref_s = nxt0[ref_s];
      #1 compare();
      checks++;
      if (tdo !== sent) begin failures++; $display("FAIL: bypass tdo"); end
    end
    step(1); step(1); step(1); step(1); step(0);  // Ex1, Upd, SelDR, SelIR, CapIR
    step(0); step(1); step(0); step(1); step(1);  // ShIR, Ex1IR, PauseIR, Ex2IR, UpdIR
    // random walk
    for (int i = 0; i < 4000; i++) step(1'($urandom));
    // asynchronous reset from a state away from TLR
    step(0); step(1); step(0);
    #2 trst_n = 0;
    #1 ref_s = 0; compare();
    trst_n = 1;
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL: state %0d never reached", s); end
    end
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
