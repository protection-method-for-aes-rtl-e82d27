// scan_attack_tb: runs a scan-based key-recovery attack against the
// protected SoC and checks that it yields only test-key material.
//
// 1. The victim encrypts with the user key; round key 10 of the user key is
//    then in the core's round-key register.
// 2. The attacker enters Shift-DR and unloads the chain at once: every bit
//    seen on the scan output is 0, and the first 512 clocks stay blocked.
// 3. With the gate open, the attacker starts an encryption, stops it before
//    the last round (9 clocks) and unloads the chain: the round key found is
//    round key 9 of the test key, not of the user key.
// 4. The attacker then runs the one-bit difference step: an all-zero state
//    with round = 10 and one capture clock, then the same with the most
//    significant bit of byte 0 set. The responses seen through the gate
//    differ in byte 0 by S(0) ^ S(80h), so the attack machinery works; the
//    last round key it recovers (ciphertext of the zero state XOR S(0)) is
//    that of the test key.
module scan_attack_tb;
  import aes_pkg::*;

  localparam int L = 262;
  localparam block_t USER_KEY  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam block_t USER_RK9  = 128'hac7766f319fadc2128d12941575c006e;
  localparam block_t TEST_KEY  = 128'h000102030405060708090a0b0c0d0e0f;
  localparam block_t TEST_RK9  = 128'h549932d1f08557681093ed9cbe2c974e;
  localparam block_t TEST_RK10 = 128'h13111d7fe3944a17f307a78b4d2b30c5;

  logic   clk = 0, rst_n, trst_n, tms, tdi, tdo, start, busy, done;
  logic   scan_enable, scan_in, gated_scan_out, fault;
  block_t plaintext, ciphertext, user_key, test_key;
  int     checks = 0, failures = 0, ones_seen;

  secure_aes_soc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tms_step(input logic m);
    @(negedge clk) tms = m;
    @(posedge clk); #1;
  endtask

  // shift vin in while collecting L bits from the gated output
  task automatic scan(input logic [L-1:0] vin, output logic [L-1:0] vout);
    @(negedge clk) scan_enable = 1;
    for (int i = 0; i < L; i++) begin
      scan_in = vin[L-1-i];
      #1 vout = {vout[L-2:0], gated_scan_out};
      @(negedge clk);
    end
    scan_enable = 0;
  endtask

  logic [L-1:0] obs, dummy;
  block_t r0, r1;

  initial begin
    rst_n = 0; trst_n = 0; tms = 1; tdi = 0; start = 0; scan_enable = 0; scan_in = 0;
    plaintext = 128'h3243f6a8885a308d313198a2e0370734; user_key = USER_KEY; test_key = TEST_KEY;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1; trst_n = 1;
    tms_step(0);
    // 1. victim encryption
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    check(ciphertext == 128'h3925841d02dc09fbdc118597196a0b32, "victim ciphertext");
    // 2. immediate unload in Shift-DR
    tms_step(1); tms_step(0); tms_step(0);
    scan('0, obs);
    check(obs == '0, "nothing leaves the chip during the flush");
    ones_seen = 0;
    @(negedge clk) scan_enable = 1;
    while (!dut.gate) begin
      @(posedge clk); #1;
      if (gated_scan_out) ones_seen++;
    end
    @(negedge clk) scan_enable = 0;
    check(ones_seen == 0, "gate opened with nothing visible before");
    // 3. start an encryption, stop before the last round, unload
    @(negedge clk) start = 1; plaintext = '0;
    @(negedge clk) start = 0;
    repeat (8) @(negedge clk);
    scan('0, obs);
    check(obs[L-3 -: 4] == 4'd10 && obs[L-2] == 1'b1, "stopped before round 10");
    check(obs[255:128] == TEST_RK9, "recovered round key 9 is the test key's");
    check(obs[255:128] != USER_RK9, "user round key 9 not recovered");
    // 4. one-bit difference step through the gate
    scan({1'b0, 1'b1, 4'd10, TEST_RK9, 128'h0}, dummy);
    @(negedge clk);                               // capture clock (scan_enable = 0)
    scan('0, obs);
    r0 = obs[127:0];
    scan({1'b0, 1'b1, 4'd10, TEST_RK9, 8'h80, 120'h0}, dummy);
    @(negedge clk);
    scan('0, obs);
    r1 = obs[127:0];
    check((r0 ^ r1) == {8'hAE, 120'h0}, "one-bit difference pattern seen through the gate");
    check((r0 ^ {16{8'h63}}) == TEST_RK10, "last round key recovered = test key's round key 10");
    check(!fault, "no fault raised by a regular scan session");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
