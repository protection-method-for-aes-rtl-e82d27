// concurrent_fault_check: duplicated gating counter with a concurrent
// comparison, giving the Output Gating signal and a Fault signal.
//
// Counter A counts while load_key is 1, counter B while shift_dr is 1; the
// two are enabled by different signals so a glitch is unlikely to upset both
// the same way. gate is the MSB of counter A. The two signals must always
// agree (both 0 in normal operation, both 1 while a data register is
// shifted), and while both are 1 the counters must be bit-for-bit equal:
//   fault = ~( (~load_key & ~shift_dr) | (load_key & shift_dr & A == B) )
// fault is combinational and is meant to drive the reset of the AES core and
// of the TAP controller. rst clears both counters synchronously.
module concurrent_fault_check #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load_key,
  input  logic         shift_dr,
  output logic         gate,
  output logic         fault,
  output logic [W-1:0] cnt_a,
  output logic [W-1:0] cnt_b
);
  logic same;

  gating_counter #(.W(W)) u_cnt_a (.clk(clk), .rst(rst), .en(load_key), .cnt(cnt_a), .gate(gate));
  gating_counter #(.W(W)) u_cnt_b (.clk(clk), .rst(rst), .en(shift_dr), .cnt(cnt_b), .gate());

  // bitwise XNOR of the two counters, all bits required to match
  assign same  = &(cnt_a ~^ cnt_b);
  assign fault = ~((~load_key & ~shift_dr) | (load_key & shift_dr & same));
endmodule
