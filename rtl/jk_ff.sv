// jk_ff: JK flip-flop, the storage element of the gating counters.
//
// Next state q+ = J & ~q | ~K & q: hold (J=K=0), reset (J=0,K=1), set
// (J=1,K=0), toggle (J=K=1). The master-slave gate structure is modelled by
// its edge behaviour: q changes once per rising clk edge. rst is a
// synchronous, active-high clear. qn is the complement of q.
module jk_ff (
  input  logic clk,
  input  logic rst,
  input  logic j,
  input  logic k,
  output logic q,
  output logic qn
);
  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= (j & ~q) | (~k & q);
  end

  assign qn = ~q;
endmodule
