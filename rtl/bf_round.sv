// bf_round: one Blowfish round, combinational.
//
// XL is first XORed with the round's P-array entry; the result goes through
// F and is XORed into XR; finally the halves swap:
//   xl' = r_in xor F(l_in xor p_key)
//   xr' = l_in xor p_key
// This is the Feistel step L(i) = R(i-1), R(i) = L(i-1) xor f(R(i-1), K(i))
// written with Blowfish's placement of the sub-key XOR. The swap is always
// applied; the cipher core undoes it after the sixteenth round.
module bf_round
  import bf_pkg::*;
(
  input  word_t                   l_in,
  input  word_t                   r_in,
  input  word_t                   p_key,
  output sidx_t [SBOX_COUNT-1:0]  sbox_idx,
  input  word_t [SBOX_COUNT-1:0]  sbox_data,
  output word_t                   l_out,
  output word_t                   r_out
);

  word_t xl, fx;

  assign xl = l_in ^ p_key;

  bf_f_function u_f (
    .x        (xl),
    .sbox_idx (sbox_idx),
    .sbox_data(sbox_data),
    .f        (fx)
  );

  assign l_out = r_in ^ fx;
  assign r_out = xl;

endmodule
