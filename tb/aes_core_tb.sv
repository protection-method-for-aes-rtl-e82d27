// aes_core_tb: self-checking test of the scanned AES-128 core.
//
// 1. FIPS-197 example vectors (Appendix B and Appendix C.1): ciphertext and a
//    latency of exactly 10 clocks from start to done.
// 2. Intermediate values of Appendix B after the initial AddRoundKey and after
//    round 1 (state and round key 1), which pins down each round step.
// 3. Scan unload after an encryption: the chain must deliver done, busy,
//    round, round key 10 and the ciphertext in that order.
// 4. Scan load + one capture clock with round = 10, busy = 1 runs exactly the
//    last round. With an all-zero state, flipping one bit of one input byte
//    must flip, in one output byte only, the bit pattern S(0) ^ S(0 ^ bit)
//    listed per bit position (bit 1 = most significant) in the bit
//    difference table below, which is the basis of scan attacks on the core.
// 5. The same for two changed bits within one byte (two-bit difference
//    table, 28 bit pairs).
module aes_core_tb;
  import aes_pkg::*;

  localparam int L = 262;
  localparam int MAX_CYCLES = 100000;

  logic   clk = 0, rst, start, scan_en, scan_in, scan_out, busy, done;
  block_t key, pt, ct;
  int     checks = 0, failures = 0;

  aes_core dut (.clk, .rst, .start, .key_in(key), .pt, .ct, .busy, .done,
                .scan_en, .scan_in, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // run one encryption, return ciphertext and clocks from start to done
  task automatic encrypt(input block_t k, input block_t p, output block_t c, output int lat);
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(posedge clk);          // start sampled here
    @(negedge clk); start = 0;
    lat = 0;
    do begin
      @(posedge clk); lat++;
      #1;
    end while (!done && lat < 100);
    c = ct;
  endtask

  // shift `vin` into the chain (msb first) while collecting what comes out
  task automatic scan(input logic [L-1:0] vin, output logic [L-1:0] vout);
    @(negedge clk);
    scan_en = 1;
    for (int i = 0; i < L; i++) begin
      scan_in = vin[L-1-i];
      #1 vout = {vout[L-2:0], scan_out};
      @(negedge clk);
    end
    scan_en = 0;
  endtask

  // last round from an all-zero state except byte `byte_i` = `val`
  task automatic last_round(input block_t rk9, input int byte_i, input byte_t val,
                            output block_t c);
    logic [L-1:0] v, dummy;
    block_t s;
    s = '0;
    if (byte_i >= 0) s[127 - 8*byte_i -: 8] = val;
    v = {1'b0, 1'b1, 4'd10, rk9, s};
    scan(v, dummy);
    @(posedge clk);          // capture clock, scan_en = 0
    #1 c = ct;
  endtask

  block_t c, c0, c1, diff;
  int lat;
  logic [L-1:0] so;
  byte_t table2 [8] = '{8'hAE, 8'h6A, 8'hD4, 8'hA9, 8'h53, 8'h91, 8'h14, 8'h1F};
  int sr_dst;
  // two-bit difference table: both changed bits in one input byte (bit 1 is
  // the most significant), and the output bits that change
  byte_t t3_in [28] = '{8'h81, 8'h41, 8'h21, 8'h11, 8'h09, 8'h05, 8'h03, 8'h82, 8'h42,
    8'h22, 8'h12, 8'h0A, 8'h06, 8'h84, 8'h44, 8'h24, 8'h14, 8'h0C, 8'h88, 8'h48, 8'h28,
    8'h18, 8'h90, 8'h50, 8'h30, 8'hA0, 8'h60, 8'hC0};
  byte_t t3_out [28] = '{8'h6F, 8'hE0, 8'h9E, 8'hE1, 8'h62, 8'h08, 8'h18, 8'h70, 8'h4F,
    8'hF0, 8'hAA, 8'h04, 8'h0C, 8'h3C, 8'h78, 8'h55, 8'h99, 8'h9D, 8'hA7, 8'h31, 8'h57,
    8'hCE, 8'h03, 8'h30, 8'h67, 8'h83, 8'hB3, 8'hD9};

  initial begin
    rst = 1; start = 0; scan_en = 0; scan_in = 0; key = '0; pt = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // FIPS-197 Appendix C.1
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, c, lat);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "C.1 ciphertext");
    check(lat == 10, $sformatf("C.1 latency %0d", lat));

    // FIPS-197 Appendix B, with intermediate states
    @(negedge clk);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pt  = 128'h3243f6a8885a308d313198a2e0370734;
    start = 1;
    @(posedge clk); #1;
    check(ct == 128'h193de3bea0f4e22b9ac68d2ae9f84808, "B start of round 1");
    @(negedge clk); start = 0;
    @(posedge clk); #1;
    check(ct == 128'ha49c7ff2689f352b6b5bea43026a5049, "B start of round 2");
    check(dut.q.rkey == 128'ha0fafe1788542cb123a339392a6c7605, "B round key 1");
    while (!done) @(posedge clk);
    #1 check(ct == 128'h3925841d02dc09fbdc118597196a0b32, "B ciphertext");

    // scan unload after encryption
    scan('0, so);
    check(so == {1'b1, 1'b0, 4'd10, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6,
                 128'h3925841d02dc09fbdc118597196a0b32}, "scan unload contents");
    check(!busy && !done && ct == '0, "chain holds what was scanned in");

    // last round by scan control: round key 9 of the Appendix B key
    last_round(128'hac7766f319fadc2128d12941575c006e, -1, 8'h00, c0);
    check(c0 == ({16{8'h63}} ^ 128'hd014f9a8c9ee2589e13f0cc8b6630ca6), "last round of zero state");
    check(done && !busy, "done after one capture clock");
    for (int b = 0; b < 16; b++) begin
      // ShiftRows destination of input byte b (row r, column k): column k - r
      sr_dst = (b % 4) + 4 * (((b / 4) - (b % 4) + 4) % 4);
      for (int bit_i = 0; bit_i < 8; bit_i++) begin
        last_round(128'hac7766f319fadc2128d12941575c006e, b, 8'h80 >> bit_i, c1);
        diff = c0 ^ c1;
        check(diff == (block_t'(table2[bit_i]) << (8 * (15 - sr_dst))),
              $sformatf("bit difference byte %0d bit %0d", b, bit_i + 1));
      end
    end

    // two-bit differences, each pair in a different input byte
    for (int p = 0; p < 28; p++) begin
      int b;
      b = p % 16;
      sr_dst = (b % 4) + 4 * (((b / 4) - (b % 4) + 4) % 4);
      last_round(128'hac7766f319fadc2128d12941575c006e, b, t3_in[p], c1);
      diff = c0 ^ c1;
      check(diff == (block_t'(t3_out[p]) << (8 * (15 - sr_dst))),
            $sformatf("two-bit difference %02h in byte %0d", t3_in[p], b));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
