// bf_sbox: one key-dependent S-box, 256 entries of 32 bits.
//
// A plain memory with one synchronous write port and one asynchronous read
// port, so that a round can look up all four S-boxes and finish within one
// clock. It has no reset: key expansion writes every entry before the cipher
// is allowed to use it. Entry count and width are the algorithm's; the port
// arrangement is this design's choice.
module bf_sbox
  import bf_pkg::*;
#(
  parameter int unsigned ENTRIES = SBOX_ENTRIES
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  word_t                      wdata,
  input  logic [$clog2(ENTRIES)-1:0] raddr,
  output word_t                      rdata
);

  word_t mem [ENTRIES];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
