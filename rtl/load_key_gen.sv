// load_key_gen: generates the Load Key signal from three outputs of an
// unmodified TAP controller, in triplicate, and votes on the copies.
//
// Each of three identical combinational branches computes
//   lk = ShiftDR & Enable & ~Select
// i.e. Load Key is 1 exactly while the TAP shifts a data register, which is
// when the scan chain of the AES core is being used. The three copies are
// brought out (the key multiplexer and the gating counter each take their
// own majority of them) together with their majority vote load_key, so a
// fault on one copy does not change the decision. The branch function is
// this design's reading of the three-branch circuit: only the signal names
// and the majority gate are given, together with the rule that Load Key is
// active only during scan test. Purely combinational, no clock.
module load_key_gen (
  input  logic       shift_dr,
  input  logic       enable,
  input  logic       select,
  output logic [2:0] lk_copies,
  output logic       load_key
);
  for (genvar i = 0; i < 3; i++) begin : g_branch
    assign lk_copies[i] = (shift_dr & enable) & ~select;
  end

  maj3 u_maj (.a(lk_copies), .y(load_key));
endmodule
