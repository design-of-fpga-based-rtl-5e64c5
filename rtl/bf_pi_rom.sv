// bf_pi_rom: the fixed initial values of the 1042 Blowfish sub-key words.
//
// Blowfish starts every key expansion from the same string: the fractional
// hexadecimal digits of pi (pi less its leading 3), taken eight digits per
// 32-bit word, first P1..P18 and then S-box 1..4 in order. Word n therefore
// holds hex digits 8n+1 .. 8n+8 after the point: word 0 = 243f6a88 (P1),
// word 18 = d1310ba6 (S-box 1 entry 0), word 1041 = 3ac372e6 (S-box 4 entry
// 255). The table is read from rtl/bf_pi_init.hex (one word per line, in
// address order). The read is asynchronous. Address order matches
// bf_subkey_store so that key expansion copies word n to sub-key n.
module bf_pi_rom
  import bf_pkg::*;
#(
  parameter string INIT_FILE = "rtl/bf_pi_init.hex"
) (
  input  skaddr_t addr,
  output word_t   data
);

  word_t rom [SUBKEY_WORDS];

  initial $readmemh(INIT_FILE, rom);

  assign data = (addr < skaddr_t'(SUBKEY_WORDS)) ? rom[addr] : '0;

endmodule
