// bf_pkg: sizes, word types and the sub-key address map shared by the
// Blowfish encryption chip.
//
// Blowfish works on 64-bit blocks split into two 32-bit halves, uses an
// 18-entry P-array and four 256-entry S-boxes of 32-bit words, runs 16
// rounds and accepts keys of 32 to 448 bits in steps of 32 bits. These
// numbers come from the algorithm description. The linear sub-key address
// map (P1..P18 at 0..17, then S-box 1..4 at 18..1041) is this design's
// choice: it is the order in which key expansion replaces the entries and
// the order of the hexadecimal digits of pi that initialise them.
package bf_pkg;

  localparam int unsigned N_ROUNDS      = 16;
  localparam int unsigned P_ENTRIES     = 18;
  localparam int unsigned SBOX_COUNT    = 4;
  localparam int unsigned SBOX_ENTRIES  = 256;
  localparam int unsigned SUBKEY_WORDS  = P_ENTRIES + SBOX_COUNT * SBOX_ENTRIES;  // 1042
  localparam int unsigned KEY_WORDS_MAX = 14;                                     // 448 bits

  typedef logic [31:0] word_t;
  typedef logic [63:0] block_t;
  typedef logic [10:0] skaddr_t;   // address into the 1042-word sub-key space
  typedef logic [4:0]  pidx_t;     // P-array index, 0 = P1 .. 17 = P18
  typedef logic [7:0]  sidx_t;     // S-box entry index
  typedef logic [3:0]  keylen_t;   // key length in 32-bit words, 1..14

  // Key as 14 words; element 13 holds the first 32 key bits (K1).
  typedef word_t [KEY_WORDS_MAX-1:0] key_t;

endpackage
