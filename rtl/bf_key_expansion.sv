// bf_key_expansion: the Blowfish key schedule controller.
//
// On key_load it turns a key of 1..14 32-bit words (32..448 bits) into the
// 1042 sub-key words, in the algorithm's order:
//   1. INIT   copy the fixed pi table into the P-array and S-boxes, XORing
//             P1..P18 with the key words K1, K2, .. cycled as often as
//             needed (for a 4-word key P5 gets K1, P18 gets K2);
//   2. ENC    encrypt a 64-bit block with the sub-keys as they stand, the
//             all-zero block first and afterwards the previous output;
//   3. WR_HI / WR_LO  write the two output halves over the next two
//             sub-key words (P1,P2, then P3,P4, .. then the S-boxes).
// Steps 2-3 repeat 521 times, until all 1042 words have been replaced.
// The encryptions use the shared bf_cipher_core through core_start /
// core_done. The key is K1 = key[13] (the first 32 bits), K2 = key[12], ..
//
// Timing in enabled cycles: INIT 1042, each encryption 18 plus 1 to start it
// and 2 writes, so 1042 + 521*21 = 11983 enabled cycles from key_load to
// keys_valid. key_load is honoured only while idle; the parent must keep the
// cipher core free during expansion (busy = 1). The sequence is the
// algorithm's; the chaining of each encryption on the previous output
// follows the standard Blowfish key schedule; the word-serial copy and the
// clamping of key_words (0 is taken as 1, above 14 as 14) are this design's.
module bf_key_expansion
  import bf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic     key_load,
  input  key_t     key,
  input  keylen_t  key_words,
  output logic     busy,
  output logic     keys_valid,
  // initial-value table
  output skaddr_t  rom_addr,
  input  word_t    rom_data,
  // sub-key write port
  output logic     sk_we,
  output skaddr_t  sk_waddr,
  output word_t    sk_wdata,
  // cipher core
  output logic     core_start,
  output block_t   core_din,
  input  logic     core_done,
  input  block_t   core_dout
);

  typedef enum logic [2:0] {KX_IDLE, KX_INIT, KX_ENC_START, KX_ENC_WAIT,
                            KX_WR_HI, KX_WR_LO} kx_state_t;

  kx_state_t state_q;
  key_t      key_q;
  keylen_t   nwords_q;
  skaddr_t   addr_q;
  logic [3:0] kidx_q;     // key word used for the current P entry, 0 = K1
  block_t    blk_q;
  logic      valid_q;

  keylen_t nwords_in;
  assign nwords_in = (key_words == 4'd0) ? 4'd1 :
                     (key_words > keylen_t'(KEY_WORDS_MAX)) ? keylen_t'(KEY_WORDS_MAX) : key_words;

  word_t kword;
  assign kword = key_q[4'(KEY_WORDS_MAX - 1) - kidx_q];

  always_comb begin
    rom_addr   = addr_q;
    sk_we      = 1'b0;
    sk_waddr   = addr_q;
    sk_wdata   = '0;
    core_start = 1'b0;
    core_din   = blk_q;
    unique case (state_q)
      KX_INIT: begin
        sk_we    = en;
        sk_wdata = rom_data ^ ((addr_q < skaddr_t'(P_ENTRIES)) ? kword : '0);
      end
      KX_ENC_START: core_start = 1'b1;
      KX_WR_HI: begin
        sk_we    = en;
        sk_wdata = blk_q[63:32];
      end
      KX_WR_LO: begin
        sk_we    = en;
        sk_waddr = addr_q + skaddr_t'(1);
        sk_wdata = blk_q[31:0];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= KX_IDLE;
      key_q    <= '0;
      nwords_q <= 4'd1;
      addr_q   <= '0;
      kidx_q   <= '0;
      blk_q    <= '0;
      valid_q  <= 1'b0;
    end else if (en) begin
      unique case (state_q)
        KX_IDLE: if (key_load) begin
          key_q    <= key;
          nwords_q <= nwords_in;
          addr_q   <= '0;
          kidx_q   <= '0;
          valid_q  <= 1'b0;
          state_q  <= KX_INIT;
        end
        KX_INIT: begin
          kidx_q <= (kidx_q == nwords_q - 4'd1) ? 4'd0 : kidx_q + 4'd1;
          if (addr_q == skaddr_t'(SUBKEY_WORDS - 1)) begin
            addr_q  <= '0;
            blk_q   <= '0;
            state_q <= KX_ENC_START;
          end else begin
            addr_q <= addr_q + skaddr_t'(1);
          end
        end
        KX_ENC_START: state_q <= KX_ENC_WAIT;
        KX_ENC_WAIT: if (core_done) begin
          blk_q   <= core_dout;
          state_q <= KX_WR_HI;
        end
        KX_WR_HI: state_q <= KX_WR_LO;
        KX_WR_LO: begin
          if (addr_q == skaddr_t'(SUBKEY_WORDS - 2)) begin
            valid_q <= 1'b1;
            state_q <= KX_IDLE;
          end else begin
            addr_q  <= addr_q + skaddr_t'(2);
            state_q <= KX_ENC_START;
          end
        end
        default: state_q <= KX_IDLE;
      endcase
    end
  end

  assign busy       = (state_q != KX_IDLE);
  assign keys_valid = valid_q;

  a_done_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    (en && core_done) |-> (state_q == KX_ENC_WAIT || state_q == KX_IDLE))
    else $error("bf_key_expansion: unexpected core_done");

endmodule
