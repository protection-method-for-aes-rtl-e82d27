// gating_counter: W-bit synchronous counter of JK flip-flops whose most
// significant bit is the Output Gating signal for the scan output.
//
// While en = 1 it counts up by one per clock (bit i toggles when all lower
// bits are 1, J = K = T), starting from 0, so the MSB becomes 1 after
// 2^(W-1) clocks; it then holds at 2^(W-1), which keeps the gate open until
// en falls. While en = 0 it is a shift register: en (0) enters bit 0 and
// each bit takes the value of the bit below it (J = D, K = ~D), so the gate
// closes one clock after en falls and the whole counter is 0 after W clocks,
// which is as good as a reset before the next scan session.
// With W = log2(N) + 1 for a scan chain of N flip-flops, 2^(W-1) >= N: the
// gate stays closed until every value that was in the chain when the scan
// session began has been shifted out. Hold at 2^(W-1) and the exact J/K
// terms are this design's choices; counting, shifting and the MSB as gate
// follow the counter as described. rst clears all bits synchronously.
module gating_counter #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] cnt,
  output logic         gate    // 1: scan output may be observed
);
  logic [W-1:0] j, k;

  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      logic t, dsh;
      t   = !cnt[W-1] && &(cnt | ~W'((1 << i) - 1));  // all lower bits 1
      dsh = (i == 0) ? en : cnt[(i == 0) ? 0 : i-1];  // serial input is en itself
      j[i] = en ? t : dsh;
      k[i] = en ? t : ~dsh;
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_bit
    jk_ff u_ff (.clk(clk), .rst(rst), .j(j[i]), .k(k[i]), .q(cnt[i]), .qn());
  end

  assign gate = cnt[W-1];
endmodule
