// maj3: three-input majority gate, y = ab | bc | ca. Used wherever one of
// the triplicated Load Key copies is voted on, so that a single forced copy
// cannot change the result.
module maj3 (
  input  logic [2:0] a,
  output logic       y
);
  assign y = (a[0] & a[1]) | (a[1] & a[2]) | (a[2] & a[0]);
endmodule
