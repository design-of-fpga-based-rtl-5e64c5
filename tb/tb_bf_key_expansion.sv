// tb_bf_key_expansion: checks the key schedule's sequence with stand-ins for
// its neighbours. A random table plays the pi ROM; a sub-key array here takes
// the writes; a model cipher core answers core_start 18 enabled cycles later
// with a mixing function of the block AND of the sub-keys as they stand at
// start, so that a write landing late or at the wrong address changes later
// results. The expected final sub-keys are computed here from the schedule's
// definition: copy the ROM, XOR P1..P18 with the key words cycled, then
// 521 times encrypt the previous output (zero at first) and write it over
// the next two words. Also checks the number of writes, the enabled-cycle
// count from key_load to keys_valid (1042 + 521*21), that key_load is
// ignored while busy, and the clamping of key_words 0 and 15. Runs with
// en high in two clocks of three.
module tb_bf_key_expansion;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en, key_load = 0;
  key_t key = '0;
  keylen_t key_words = 4'd1;
  logic busy, keys_valid, sk_we, core_start, core_done;
  skaddr_t rom_addr, sk_waddr;
  word_t rom_data, sk_wdata;
  block_t core_din, core_dout;

  word_t rom   [SUBKEY_WORDS];
  word_t store [SUBKEY_WORDS];
  word_t expv  [SUBKEY_WORDS];
  int    writes;
  int    en_edges = 0;
  always @(posedge clk) if (en) en_edges <= en_edges + 1;

  bf_key_expansion dut (.clk(clk), .rst_n(rst_n), .en(en), .key_load(key_load),
    .key(key), .key_words(key_words), .busy(busy), .keys_valid(keys_valid),
    .rom_addr(rom_addr), .rom_data(rom_data), .sk_we(sk_we), .sk_waddr(sk_waddr),
    .sk_wdata(sk_wdata), .core_start(core_start), .core_din(core_din),
    .core_done(core_done), .core_dout(core_dout));

  always #5 clk = ~clk;
  int phase = 0;
  always @(posedge clk) phase <= (phase == 2) ? 0 : phase + 1;
  assign en = (phase != 1);

  assign rom_data = (rom_addr < skaddr_t'(SUBKEY_WORDS)) ? rom[rom_addr] : 32'hbad0_bad0;

  function automatic block_t mix(block_t b, ref word_t sk [SUBKEY_WORDS]);
    word_t h = sk[0] ^ sk[17] ^ sk[18] ^ sk[1041];
    for (int i = 0; i < SUBKEY_WORDS; i += 37) h = (h << 3 | h >> 29) + sk[i];
    return {b[31:0] ^ h, (b[63:32] + 32'h9e37_79b9) ^ {h[15:0], h[31:16]}};
  endfunction

  // model core and sub-key array
  logic   m_busy = 0;
  int     m_cnt = 0;
  block_t m_res;
  always @(posedge clk) if (en) begin
    core_done <= 1'b0;
    if (sk_we) begin
      store[sk_waddr] <= sk_wdata;
      writes++;
      if (sk_waddr >= skaddr_t'(SUBKEY_WORDS)) begin
        failures++; $display("FAIL write to %0d", sk_waddr);
      end
    end
    if (core_start) begin
      if (m_busy) begin failures++; $display("FAIL start while core busy"); end
      m_busy <= 1; m_cnt <= 17; m_res <= mix(core_din, store);
    end else if (m_busy) begin
      m_cnt <= m_cnt - 1;
      if (m_cnt == 1) begin m_busy <= 0; core_done <= 1'b1; core_dout <= m_res; end
    end
  end

  function automatic void ref_schedule(key_t k, int nw);
    block_t b = '0;
    for (int a = 0; a < SUBKEY_WORDS; a++)
      expv[a] = rom[a] ^ ((a < P_ENTRIES) ? k[KEY_WORDS_MAX - 1 - (a % nw)] : 32'h0);
    for (int j = 0; j < SUBKEY_WORDS; j += 2) begin
      b = mix(b, expv);
      expv[j] = b[63:32];
      expv[j+1] = b[31:0];
    end
  endfunction

  task automatic expand(key_t k, keylen_t kw, int nw_eff);
    int cyc = 0, t0;
    key_t other;
    @(negedge clk);
    while (!en) @(negedge clk);
    key = k; key_words = kw; key_load = 1; writes = 0;
    @(posedge clk);
    @(negedge clk);
    t0 = en_edges;       // includes the edge that took the key
    key_load = 0;
    checks++;
    if (!busy || keys_valid) begin failures++; $display("FAIL busy/valid after load"); end
    // a second key offered while busy must be ignored
    other = ~k;
    key = other; key_words = 4'd3;
    key_load = 1;
    repeat (40) @(negedge clk);
    key_load = 0;
    while (!keys_valid && en_edges - t0 < 20000) @(negedge clk);
    cyc = en_edges - t0;
    ref_schedule(k, nw_eff);
    checks += 3;
    // en edges counted from the one after key_load
    if (cyc != 1042 + 521*21) begin failures++; $display("FAIL expansion took %0d enabled cycles", cyc); end
    if (writes != 2 * SUBKEY_WORDS) begin failures++; $display("FAIL %0d writes", writes); end
    if (busy) begin failures++; $display("FAIL still busy"); end
    for (int a = 0; a < SUBKEY_WORDS; a++) begin
      checks++;
      if (store[a] !== expv[a]) begin
        failures++;
        if (failures < 10) $display("FAIL sub-key %0d = %h exp %h (key words %0d)", a, store[a], expv[a], kw);
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t k;
    for (int a = 0; a < SUBKEY_WORDS; a++) begin rom[a] = $urandom(); store[a] = $urandom(); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (busy || keys_valid) begin failures++; $display("FAIL state after reset"); end
    foreach (k[i]) k[i] = $urandom();
    expand(k, 4'd14, 14);
    expand(k, 4'd1, 1);
    foreach (k[i]) k[i] = $urandom();
    expand(k, 4'd4, 4);
    expand(k, 4'd5, 5);
    expand(k, 4'd0, 1);
    expand(k, 4'd15, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
