// secure_aes_soc: AES-128 core with a JTAG-compatible scan chain, protected
// against scan-based key recovery by logic placed entirely outside the core
// and outside the TAP controller.
//
// Blocks and connections:
//   jtag_tap_ctrl          unmodified 16-state TAP controller
//   load_key_gen           Load Key = ShiftDR & Enable & ~Select, three copies
//   key_input_mux          key input = majority(Load Key) ? test_key : user_key
//   aes_core               iterative AES-128, all flip-flops on one scan chain
//   concurrent_fault_check two gating counters (Load Key, ShiftDR), compared
//   output AND gate        gated_scan_out = core scan_out & Output Gating
// In normal operation the core encrypts with the user key and the scan
// output is held at 0. While the TAP is in Shift-DR, Load Key is 1: the core
// key input carries the test key, and the scan output stays blocked for the
// first 2^(CNT_W-1) >= SCAN_LEN clocks, long enough to flush every value
// that was in the chain. After that the tester may toggle scan_enable
// freely (shift in, one capture clock, shift out) and see the responses,
// which only ever involve the test key. Leaving Shift-DR closes the gate at
// the next clock. fault (counters or control signals disagree) resets the
// AES core and the TAP controller one clock later.
//
// Clocking: one clock, clk, runs the core, the TAP controller (it is TCK)
// and the counters; the tester drives TCK and the system clock from the same
// source during scan test. rst_n is the active-low system reset (synchronous
// for the core and counters); trst_n is the TAP's asynchronous reset. The
// single clock, registering Fault before it drives the resets, the reset
// wiring of the counters, the user key as an input
// port (its storage is not part of this design) and the bypass-only TDO are
// this design's choices.
module secure_aes_soc
  import aes_pkg::*;
  import jtag_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // JTAG pins
  input  logic   trst_n,
  input  logic   tms,
  input  logic   tdi,
  output logic   tdo,
  // functional interface
  input  logic   start,
  input  block_t plaintext,
  output block_t ciphertext,
  output logic   busy,
  output logic   done,
  // keys
  input  block_t user_key,
  input  block_t test_key,
  // scan interface
  input  logic   scan_enable,
  input  logic   scan_in,
  output logic   gated_scan_out,
  // status
  output logic   fault
);
  // flip-flops on the core's scan chain and the counter width log2(N) + 1
  localparam int unsigned SCAN_LEN = 2 * 128 + 4 + 2;
  localparam int unsigned CNT_W    = $clog2(SCAN_LEN) + 1;

  tap_state_t       tap_state;
  tap_ctrl_t        tap;
  logic [2:0]       lk_copies;
  logic [2:0]       gate_en_copies;
  logic             load_key, gate_cnt_en;
  logic             gate, core_scan_out;
  logic             core_rst, tap_rst_n, cnt_rst, fault_q;
  block_t           key_input;
  logic [CNT_W-1:0] cnt_a, cnt_b;

  // Fault is registered once, then resets the core and the TAP controller
  // (and the counters, so the next scan session starts from 0). A purely
  // combinational path would clear itself: resetting the TAP removes the
  // disagreement that raised Fault before a synchronous reset could act.
  always_ff @(posedge clk) begin
    if (!rst_n) fault_q <= 1'b0;
    else        fault_q <= fault;
  end

  assign core_rst  = ~rst_n | fault_q;
  assign tap_rst_n = trst_n & ~fault_q;
  assign cnt_rst   = ~rst_n | ~trst_n | fault_q;

  jtag_tap_ctrl u_tap (
    .tck(clk), .trst_n(tap_rst_n), .tms(tms), .tdi(tdi), .tdo(tdo),
    .state(tap_state), .ctrl(tap)
  );

  load_key_gen u_lkgen (
    .shift_dr(tap.shift_dr), .enable(tap.enable), .select(tap.select),
    .lk_copies(lk_copies), .load_key(load_key)
  );

  key_input_mux u_kmux (
    .lk_copies(lk_copies), .user_key(user_key), .test_key(test_key), .key_out(key_input)
  );

  aes_core u_core (
    .clk(clk), .rst(core_rst), .start(start), .key_in(key_input), .pt(plaintext),
    .ct(ciphertext), .busy(busy), .done(done),
    .scan_en(scan_enable), .scan_in(scan_in), .scan_out(core_scan_out)
  );

  // the counter's enable is its own majority vote of the Load Key copies
  assign gate_en_copies = lk_copies;
  maj3 u_maj_cnt (.a(gate_en_copies), .y(gate_cnt_en));

  concurrent_fault_check #(.W(CNT_W)) u_cfc (
    .clk(clk), .rst(cnt_rst), .load_key(gate_cnt_en), .shift_dr(tap.shift_dr),
    .gate(gate), .fault(fault), .cnt_a(cnt_a), .cnt_b(cnt_b)
  );

  assign gated_scan_out = core_scan_out & gate;

  // load_key and the counter enable come from the same three copies
  always_comb assert (load_key == gate_cnt_en);
endmodule
