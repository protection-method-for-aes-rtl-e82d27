// secure_aes_soc_tb: end-to-end test of the protected AES SoC at its default
// sizes (262-bit scan chain, 10-bit gating counters).
//
// Sequence:
//  1. normal mode: encrypt with the user key (FIPS-197 Appendix B vector);
//     the scan output stays 0 even with scan_enable raised
//  2. scan-based attack on the user key: enter Shift-DR right after the
//     encryption, while the chain still holds round key 10 of the user key,
//     and shift; the output must stay 0 for exactly 512 clocks
//  3. scan test with the test key: with the gate open, run an encryption
//     (the key input now carries the test key, Appendix C.1 vector), shift
//     the chain out and compare it bit for bit with the expected contents
//  4. leave Shift-DR: the gate closes on the next clock; normal encryption
//     with the user key works again
//  5. one Load Key copy forced to 1 in normal mode: the majority keeps the
//     user key
//  6. a glitch on one gating counter during a scan: Fault is raised and
//     resets the TAP controller and the AES core
// Throughout, a monitor checks that the scan output is 0 whenever the gate
// is closed. Each mechanism is counted and must have happened.
module secure_aes_soc_tb;
  import aes_pkg::*;
  import jtag_pkg::*;

  localparam int L       = 262;
  localparam int OPEN_AT = 512;   // 2^(CNT_W-1), CNT_W = clog2(262) + 1 = 10

  localparam block_t USER_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam block_t USER_PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam block_t USER_CT  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam block_t USER_RK10 = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
  localparam block_t TEST_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam block_t TEST_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam block_t TEST_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  localparam block_t TEST_RK10 = 128'h13111d7fe3944a17f307a78b4d2b30c5;

  logic   clk = 0, rst_n, trst_n, tms, tdi, tdo, start, busy, done;
  logic   scan_enable, scan_in, gated_scan_out, fault;
  block_t plaintext, ciphertext, user_key, test_key;
  int     checks = 0, failures = 0;
  int     n_normal = 0, n_blocked_ones = 0, n_flush_blocked = 0, n_test_key_obs = 0;
  int     n_gate_close = 0, n_outvoted = 0, n_fault_reset = 0, n_bypass = 0;

  secure_aes_soc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the scan output must be 0 whenever the gate is closed
  always @(posedge clk) begin
    #1;
    if (!dut.gate) begin
      if (gated_scan_out) begin
        failures++;
        $display("FAIL: scan output visible with gate closed");
      end
      if (dut.core_scan_out) n_blocked_ones++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tms_step(input logic m);
    @(negedge clk) tms = m;
    @(posedge clk); #1;
  endtask

  task automatic encrypt(input block_t p);
    @(negedge clk);
    plaintext = p; start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  logic [L-1:0] obs;
  int t_open;

  initial begin
    rst_n = 0; trst_n = 0; tms = 1; tdi = 0; start = 0; scan_enable = 0; scan_in = 0;
    plaintext = '0; user_key = USER_KEY; test_key = TEST_KEY;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1; trst_n = 1;
    tms_step(0);                                  // Run-Test/Idle

    // 1. normal encryption with the user key
    encrypt(USER_PT);
    check(ciphertext == USER_CT, "normal mode: user-key ciphertext");
    if (ciphertext == USER_CT) n_normal++;
    check(dut.u_core.q.rkey == USER_RK10, "user round key 10 sits in the chain");

    // 2. attack: Shift-DR and shift; nothing may come out for OPEN_AT clocks
    tms_step(1); tms_step(0); tms_step(0);        // Select-DR, Capture-DR, Shift-DR
    check(dut.u_tap.state == SHIFT_DR && dut.load_key, "in Shift-DR with Load Key");
    @(negedge clk) scan_enable = 1; scan_in = 0;
    t_open = -1;
    for (int t = 1; t <= OPEN_AT + 4; t++) begin
      @(posedge clk); #1;
      if (t <= L && dut.core_scan_out) n_flush_blocked++;
      if (dut.gate && t_open < 0) t_open = t;
    end
    // one count per clock edge with Load Key at 1
    check(t_open == OPEN_AT, $sformatf("gate opened after %0d clocks in Shift-DR", t_open));
    check(n_flush_blocked > 0, "user-key bits reached the scan output pin and were blocked");
    check(!fault, "no fault during a regular scan");

    // TDO follows TDI through the bypass register in Shift-DR
    for (int i = 0; i < 16; i++) begin
      logic b;
      b = 1'($urandom);
      @(negedge clk) tdi = b;
      @(posedge clk); #1;
      check(tdo == b, "TDO through bypass");
      if (tdo == b) n_bypass++;
    end

    // 3. fake-key encryption inside the scan session, then unload the chain
    @(negedge clk) scan_enable = 0;
    check(dut.key_input == TEST_KEY, "key input carries the test key during scan");
    encrypt(TEST_PT);
    check(ciphertext == TEST_CT, "test-mode ciphertext uses the test key");
    @(negedge clk) scan_enable = 1;
    for (int i = 0; i < L; i++) begin
      #1 obs = {obs[L-2:0], gated_scan_out};
      @(negedge clk);
    end
    check(obs == {1'b1, 1'b0, 4'd10, TEST_RK10, TEST_CT}, "chain observed through the gate");
    if (obs == {1'b1, 1'b0, 4'd10, TEST_RK10, TEST_CT}) n_test_key_obs++;

    // 4. leave Shift-DR: Load Key falls in Exit1-DR, the gate closes one
    //    clock later
    @(negedge clk) tms = 1;                       // to Exit1-DR
    @(posedge clk); #1;
    check(dut.u_tap.state == EXIT1_DR && !dut.load_key, "Exit1-DR, Load Key off");
    @(posedge clk); #1;
    check(!dut.gate && gated_scan_out == 0, "gate closed after leaving Shift-DR");
    if (!dut.gate) n_gate_close++;
    scan_enable = 0;
    tms = 0;                                      // Update-DR -> Run-Test/Idle
    repeat (12) @(posedge clk);
    check(dut.cnt_a == 0 && dut.cnt_b == 0, "counters empty again in normal mode");
    encrypt(USER_PT);
    check(ciphertext == USER_CT, "normal mode again: user-key ciphertext");
    if (ciphertext == USER_CT) n_normal++;

    // 5. one Load Key copy forced: still the user key
    force dut.lk_copies = 3'b010;
    #1 check(dut.key_input == USER_KEY && !fault, "single forced copy outvoted");
    encrypt(USER_PT);
    check(ciphertext == USER_CT, "forced copy: still user-key ciphertext");
    if (ciphertext == USER_CT && !fault) n_outvoted++;
    release dut.lk_copies;

    // 6. glitch one counter during a scan
    tms_step(1); tms_step(0); tms_step(0);        // Shift-DR
    repeat (20) @(posedge clk);
    @(negedge clk);
    dut.u_cfc.u_cnt_b.g_bit[2].u_ff.q = ~dut.u_cfc.u_cnt_b.g_bit[2].u_ff.q;
    #1 check(fault, "glitch raises Fault");
    @(posedge clk); #1;
    check(dut.u_tap.state == TEST_LOGIC_RESET, "Fault reset the TAP controller");
    @(posedge clk); #1;
    check(ciphertext == '0 && !busy && !done, "Fault reset the AES core");
    check(!fault && dut.cnt_a == 0 && dut.cnt_b == 0, "Fault cleared, counters reset");
    if (dut.u_tap.state == TEST_LOGIC_RESET && ciphertext == '0) n_fault_reset++;

    check(n_normal > 0,        "mechanism: normal-mode encryption");
    check(n_blocked_ones > 0,  "mechanism: scan output blocked");
    check(n_flush_blocked > 0, "mechanism: chain flush blocked");
    check(n_test_key_obs > 0,  "mechanism: test-key response observed");
    check(n_gate_close > 0,    "mechanism: gate closed on leaving Shift-DR");
    check(n_outvoted > 0,      "mechanism: majority outvotes a forced copy");
    check(n_fault_reset > 0,   "mechanism: fault reset");
    check(n_bypass > 0,        "mechanism: TDO bypass");
    $display("normal=%0d blocked_ones=%0d flush_blocked=%0d test_key_obs=%0d gate_close=%0d outvoted=%0d fault_reset=%0d bypass=%0d",
             n_normal, n_blocked_ones, n_flush_blocked, n_test_key_obs, n_gate_close,
             n_outvoted, n_fault_reset, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
