// aes_key_expand: one step of the AES-128 key schedule (the "Key Expansion
// Block" of the AES core), purely combinational.
//
// Given round key i (four words w0..w3) and the round number i+1, it returns
// round key i+1:  t = SubWord(RotWord(w3)) ^ {rcon(i+1), 24'h0},
// w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'.
// The core calls it once per clock, so the schedule runs alongside the
// rounds and no key memory is needed (an iterative core with on-the-fly key
// scheduling, as the area figures assume). The algorithm is FIPS-197; the
// on-the-fly structure is this design's choice.
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t     rk_in,    // round key i
  input  logic [3:0] round,    // i+1, in 1..10
  output block_t     rk_out    // round key i+1
);
  word_t w0, w1, w2, w3, t, n0, n1, n2, n3;

  always_comb begin
    {w0, w1, w2, w3} = rk_in;
    t  = {sbox(w3[23:16]) ^ rcon(round), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    rk_out = {n0, n1, n2, n3};
  end
endmodule
