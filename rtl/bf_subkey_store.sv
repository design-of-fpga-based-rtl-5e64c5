// bf_subkey_store: all 4168 bytes of Blowfish sub-keys, the P-array and the
// four S-boxes, behind a single linear write address.
//
// Write address map (one 32-bit word per address):
//   0    .. 17    P1 .. P18
//   18   .. 273   S-box 1, entries 0..255
//   274  .. 529   S-box 2
//   530  .. 785   S-box 3
//   786  .. 1041  S-box 4
// This is the order in which key expansion replaces the entries, so the key
// schedule only has to count an address upwards. Reads are split the way the
// round needs them: two P-array ports and one read index per S-box, all
// asynchronous. Writes take effect at the rising clock edge. The map is this
// design's choice; the table sizes are the algorithm's.
module bf_subkey_store
  import bf_pkg::*;
(
  input  logic                    clk,
  input  logic                    we,
  input  skaddr_t                 waddr,
  input  word_t                   wdata,
  input  pidx_t                   p_idx_a,
  output word_t                   p_data_a,
  input  pidx_t                   p_idx_b,
  output word_t                   p_data_b,
  input  sidx_t [SBOX_COUNT-1:0]  sbox_idx,
  output word_t [SBOX_COUNT-1:0]  sbox_data
);

  localparam skaddr_t S_BASE = skaddr_t'(P_ENTRIES);

  logic    p_we;
  logic [9:0] s_off;   // offset into the S-box region: box in [9:8], entry in [7:0]
  logic [SBOX_COUNT-1:0] s_we;

  always_comb begin
    p_we  = we && (waddr < S_BASE);
    s_off = 10'(waddr - S_BASE);
    for (int b = 0; b < SBOX_COUNT; b++)
      s_we[b] = we && (waddr >= S_BASE) && (waddr < skaddr_t'(SUBKEY_WORDS))
                   && (s_off[9:8] == 2'(b));
  end

  bf_parray u_parray (
    .clk    (clk),
    .we     (p_we),
    .waddr  (pidx_t'(waddr)),
    .wdata  (wdata),
    .raddr_a(p_idx_a),
    .rdata_a(p_data_a),
    .raddr_b(p_idx_b),
    .rdata_b(p_data_b)
  );

  for (genvar b = 0; b < SBOX_COUNT; b++) begin : g_sbox
    bf_sbox u_sbox (
      .clk  (clk),
      .we   (s_we[b]),
      .waddr(s_off[7:0]),
      .wdata(wdata),
      .raddr(sbox_idx[b]),
      .rdata(sbox_data[b])
    );
  end

endmodule
