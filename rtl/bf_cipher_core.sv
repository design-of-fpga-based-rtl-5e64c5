// bf_cipher_core: iterative 16-round Blowfish datapath, one round per
// enabled clock.
//
// The 64-bit input block is split into XL (upper 32 bits) and XR. Each round
// computes XL ^= P[i], XR ^= F(XL) and swaps the halves (bf_round). After
// sixteen rounds the last swap is undone and the halves are whitened with
// the two unused P entries: XR ^= P17, XL ^= P18. Decryption is the same
// datapath with the P-array read in reverse order (P18 .. P3 in the rounds,
// P2 and P1 in the whitening), which is the Feistel property the design
// rests on. The P-array and S-boxes are outside this block; it drives their
// read ports.
//
// Timing, counted in enabled cycles (en = 1):
//   start is sampled while idle; the block is loaded on that edge;
//   16 round cycles follow, then one whitening cycle that registers dout;
//   done is high for the one enabled cycle after that, dout holds until the
//   next block completes. start to done: 18 enabled cycles; a new block may
//   start in the cycle done is high, so one block takes 18 enabled cycles.
// The round structure and key order are the algorithm's; one round per
// clock, the clock enable and the start/done handshake are this design's.
module bf_cipher_core
  import bf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,         // clock enable (divided rate)
  input  logic                    start,      // begin a block; honoured only while idle
  input  logic                    decrypt,    // 0: encrypt, 1: decrypt; sampled with start
  input  block_t                  din,
  output block_t                  dout,
  output logic                    done,       // one enabled cycle after the block completes
  output logic                    idle,
  // sub-key read ports
  output pidx_t                   p_idx_a,
  input  word_t                   p_data_a,
  output pidx_t                   p_idx_b,
  input  word_t                   p_data_b,
  output sidx_t [SBOX_COUNT-1:0]  sbox_idx,
  input  word_t [SBOX_COUNT-1:0]  sbox_data
);

  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_FINAL} state_t;

  state_t       state_q;
  word_t        l_q, r_q;
  logic [3:0]   rnd_q;
  logic         dec_q;
  word_t        l_nx, r_nx;

  // Round key: P[rnd] when encrypting, P[17-rnd] when decrypting. In the
  // whitening cycle port A gives the entry for the left half (P18 / P1) and
  // port B the one for the right half (P17 / P2).
  always_comb begin
    if (state_q == S_FINAL)
      p_idx_a = dec_q ? pidx_t'(0) : pidx_t'(17);
    else
      p_idx_a = dec_q ? (pidx_t'(17) - pidx_t'(rnd_q)) : pidx_t'(rnd_q);
    p_idx_b = dec_q ? pidx_t'(1) : pidx_t'(16);
  end

  bf_round u_round (
    .l_in     (l_q),
    .r_in     (r_q),
    .p_key    (p_data_a),
    .sbox_idx (sbox_idx),
    .sbox_data(sbox_data),
    .l_out    (l_nx),
    .r_out    (r_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      l_q     <= '0;
      r_q     <= '0;
      rnd_q   <= '0;
      dec_q   <= 1'b0;
      dout    <= '0;
      done    <= 1'b0;
    end else if (en) begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          l_q     <= din[63:32];
          r_q     <= din[31:0];
          dec_q   <= decrypt;
          rnd_q   <= '0;
          state_q <= S_ROUND;
        end
        S_ROUND: begin
          l_q   <= l_nx;
          r_q   <= r_nx;
          rnd_q <= rnd_q + 4'd1;
          if (rnd_q == 4'(N_ROUNDS - 1)) state_q <= S_FINAL;
        end
        S_FINAL: begin
          // undo the last swap, then whiten
          dout    <= {r_q ^ p_data_a, l_q ^ p_data_b};
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign idle = (state_q == S_IDLE);

  // A start offered while a block is in flight would be lost.
  a_start_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (en && start) |-> idle)
    else $error("bf_cipher_core: start while busy");

endmodule
