// blowfish_chip: Blowfish encryption/decryption chip, 64-bit blocks, keys of
// 32 to 448 bits.
//
// Structure: a frequency divider (bf_freq_div) produces the enable at which
// all sequencing advances. The key expansion controller (bf_key_expansion)
// fills the sub-key store (bf_subkey_store: P-array and four S-boxes) from
// the pi table (bf_pi_rom) and the key, borrowing the cipher core
// (bf_cipher_core) for its 521 encryptions. Once the sub-keys are valid the
// same core serves user blocks, encrypting or decrypting one 64-bit block per
// 18 enabled cycles.
//
// Interface (all synchronous to clk, rst_n asynchronous active low):
//   key_load / key_load_ready  a key is taken on a clk edge with both high;
//       key_load_ready is high in enabled cycles when no key expansion and no
//       block is in progress. key is 14 words, key[13] = first 32 key bits,
//       key_words = number of words used (1..14), left-aligned at key[13].
//   keys_valid   high once expansion has finished, low from key_load on.
//   start / ready  a block is taken on a clk edge with both high; ready is
//       high in enabled cycles when the keys are valid and the core is idle.
//       decrypt and data_in are sampled with it.
//   done / data_out  done pulses for one clk when a user block completes;
//       data_out holds the result until the next user block completes.
// Latency: key load to keys_valid about 12,000 enabled cycles; start to done
// 18 enabled cycles, i.e. 18*CLK_DIV clocks.
// What follows the algorithm: the key schedule and the cipher. What is this
// design's: the handshakes, the shared core, the word-serial sub-key
// initialisation and the default divide ratio.
module blowfish_chip
  import bf_pkg::*;
#(
  parameter int unsigned CLK_DIV = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // key
  input  key_t    key,
  input  keylen_t key_words,
  input  logic    key_load,
  output logic    key_load_ready,
  output logic    keys_valid,
  // data
  input  logic    start,
  input  logic    decrypt,
  input  block_t  data_in,
  output logic    ready,
  output logic    done,
  output block_t  data_out
);

  logic en;

  bf_freq_div #(.DIV(CLK_DIV)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .tick (en)
  );

  // key expansion <-> shared resources
  logic    kx_busy, kx_valid;
  skaddr_t rom_addr;
  word_t   rom_data;
  logic    sk_we;
  skaddr_t sk_waddr;
  word_t   sk_wdata;
  logic    kx_core_start;
  block_t  kx_core_din;

  // cipher core
  logic    core_start, core_dec, core_done, core_idle;
  block_t  core_din, core_dout;
  pidx_t   p_idx_a, p_idx_b;
  word_t   p_data_a, p_data_b;
  sidx_t [SBOX_COUNT-1:0] sbox_idx;
  word_t [SBOX_COUNT-1:0] sbox_data;

  assign key_load_ready = en && core_idle && !kx_busy;
  assign ready          = en && core_idle && !kx_busy && kx_valid;
  assign keys_valid     = kx_valid;

  bf_pi_rom u_rom (
    .addr(rom_addr),
    .data(rom_data)
  );

  bf_key_expansion u_kx (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .key_load  (key_load && key_load_ready),
    .key       (key),
    .key_words (key_words),
    .busy      (kx_busy),
    .keys_valid(kx_valid),
    .rom_addr  (rom_addr),
    .rom_data  (rom_data),
    .sk_we     (sk_we),
    .sk_waddr  (sk_waddr),
    .sk_wdata  (sk_wdata),
    .core_start(kx_core_start),
    .core_din  (kx_core_din),
    .core_done (core_done),
    .core_dout (core_dout)
  );

  // The core belongs to key expansion while it runs, to the user otherwise.
  assign core_start = kx_busy ? kx_core_start : (start && ready);
  assign core_dec   = kx_busy ? 1'b0          : decrypt;
  assign core_din   = kx_busy ? kx_core_din   : data_in;

  bf_cipher_core u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .start    (core_start),
    .decrypt  (core_dec),
    .din      (core_din),
    .dout     (core_dout),
    .done     (core_done),
    .idle     (core_idle),
    .p_idx_a  (p_idx_a),
    .p_data_a (p_data_a),
    .p_idx_b  (p_idx_b),
    .p_data_b (p_data_b),
    .sbox_idx (sbox_idx),
    .sbox_data(sbox_data)
  );

  bf_subkey_store u_store (
    .clk      (clk),
    .we       (sk_we),
    .waddr    (sk_waddr),
    .wdata    (sk_wdata),
    .p_idx_a  (p_idx_a),
    .p_data_a (p_data_a),
    .p_idx_b  (p_idx_b),
    .p_data_b (p_data_b),
    .sbox_idx (sbox_idx),
    .sbox_data(sbox_data)
  );

  // User-visible result: only blocks the user started.
  logic user_done;
  assign user_done = core_done && en && !kx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         data_out <= '0;
    else if (user_done) data_out <= core_dout;
  end

  // done is registered with data_out so both change together
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= user_done;
  end

  a_ready_needs_keys: assert property (@(posedge clk) disable iff (!rst_n)
    ready |-> keys_valid);

endmodule
