// key_input_mux: the multiplexer in front of the AES key input, with the
// majority vote built in.
//
// key_out is test_key when at least two of the three Load Key copies are 1
// and user_key otherwise, so the secret user key reaches the core only in
// normal operation and a single forced select copy cannot switch it in
// during a scan test. The test key is a parallel input so that any test key
// can be applied. Purely combinational.
module key_input_mux
  import aes_pkg::*;
(
  input  logic [2:0] lk_copies,
  input  block_t     user_key,
  input  block_t     test_key,
  output block_t     key_out
);
  logic sel;

  maj3 u_maj (.a(lk_copies), .y(sel));

  assign key_out = sel ? test_key : user_key;
endmodule
