// aes_core: iterative AES-128 encryption core with a full mux-scan chain.
//
// One round per clock, key schedule computed on the fly (no pipeline, no
// round-key memory). A start pulse while idle loads the plaintext XOR the
// key (the initial AddRoundKey) and the key itself; each of the following
// ten clocks runs one round (SubBytes, ShiftRows, MixColumns except in round
// 10, AddRoundKey with the next round key). `done` rises with the tenth
// round and `ct` then holds the ciphertext until the next start.
// Timing: start sampled at clock edge 0, done = 1 after edge 10.
//
// Every flip-flop of the core (state, round key, round counter, busy, done;
// SCAN_LEN = 262 bits) is on one scan chain. With scan_en = 1 each clock
// shifts the chain by one place: scan_in enters at bit 0 of the packed
// register set and scan_out is its top bit, the done flag first, then busy,
// the round counter, the round key and the state. With scan_en = 0 the core
// runs normally, so one capture clock after scanning in a state with
// round = 10 and busy = 1 executes exactly the last round: this is the
// control that scan-based attacks on such cores rely on. The chain order is
// this design's choice; the document only says that the core is iterative
// with key scheduling and that its registers are all on the scan chain.
// rst is synchronous and active high.
module aes_core
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  block_t     key_in,
  input  block_t     pt,
  output block_t     ct,
  output logic       busy,
  output logic       done,
  input  logic       scan_en,
  input  logic       scan_in,
  output logic       scan_out
);
  typedef struct packed {
    logic       done;
    logic       busy;
    logic [3:0] round;   // number of the next round to run, 1..10
    block_t     rkey;    // round key of the last round run
    block_t     state;
  } regs_t;

  localparam int unsigned SCAN_LEN = $bits(regs_t);

  regs_t  q, d;
  block_t rk_next, sr;

  aes_key_expand u_kexp (.rk_in(q.rkey), .round(q.round), .rk_out(rk_next));

  always_comb begin
    d  = q;
    sr = shift_rows(sub_bytes(q.state));
    if (scan_en) begin
      d = regs_t'({q[SCAN_LEN-2:0], scan_in});
    end else if (start && !q.busy) begin
      d.state = pt ^ key_in;
      d.rkey  = key_in;
      d.round = 4'd1;
      d.busy  = 1'b1;
      d.done  = 1'b0;
    end else if (q.busy) begin
      d.rkey  = rk_next;
      if (q.round >= 4'(NR)) begin
        d.state = sr ^ rk_next;
        d.busy  = 1'b0;
        d.done  = 1'b1;
      end else begin
        d.state = mix_columns(sr) ^ rk_next;
        d.round = q.round + 4'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

  assign ct       = q.state;
  assign busy     = q.busy;
  assign done     = q.done;
  assign scan_out = q[SCAN_LEN-1];
endmodule
