// bf_parray: the P-array, 18 sub-keys P1..P18 of 32 bits.
//
// A register file with one synchronous write port and two asynchronous read
// ports. Port A supplies the round key each round; in the final whitening
// step ports A and B supply the two remaining entries at once (P17 and P18
// when encrypting, P2 and P1 when decrypting). Index 0 is P1. There is no
// reset: key expansion writes all entries before use. Size and width are the
// algorithm's; the two read ports are this design's choice.
module bf_parray
  import bf_pkg::*;
#(
  parameter int unsigned ENTRIES = P_ENTRIES
) (
  input  logic  clk,
  input  logic  we,
  input  pidx_t waddr,
  input  word_t wdata,
  input  pidx_t raddr_a,
  output word_t rdata_a,
  input  pidx_t raddr_b,
  output word_t rdata_b
);

  word_t p [ENTRIES];

  always_ff @(posedge clk)
    if (we && waddr < pidx_t'(ENTRIES)) p[waddr] <= wdata;

  assign rdata_a = (raddr_a < pidx_t'(ENTRIES)) ? p[raddr_a] : '0;
  assign rdata_b = (raddr_b < pidx_t'(ENTRIES)) ? p[raddr_b] : '0;

endmodule
