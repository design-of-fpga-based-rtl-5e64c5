// bf_f_function: the Blowfish round function F.
//
// F splits its 32-bit input XL into four bytes a, b, c, d (a = bits 31..24)
// and looks each one up in its own S-box: a in S-box 1, b in S-box 2, and so
// on. The four 32-bit outputs are combined as ((S1[a] + S2[b]) xor S3[c]) +
// S4[d], with both additions modulo 2^32. The S-boxes themselves live in
// bf_subkey_store; this block drives their read indices and combines the
// data they return, all combinationally (no clock, zero latency).
// The add-xor-add structure is the algorithm's; which byte feeds which
// S-box follows the standard Blowfish definition (most significant byte to
// S-box 1).
module bf_f_function
  import bf_pkg::*;
(
  input  word_t                   x,          // XL
  output sidx_t [SBOX_COUNT-1:0]  sbox_idx,   // [0] -> S-box 1 .. [3] -> S-box 4
  input  word_t [SBOX_COUNT-1:0]  sbox_data,  // lookup results, same order
  output word_t                   f
);

  always_comb begin
    for (int b = 0; b < SBOX_COUNT; b++)
      sbox_idx[b] = x[31 - 8*b -: 8];
    f = ((sbox_data[0] + sbox_data[1]) ^ sbox_data[2]) + sbox_data[3];
  end

endmodule
