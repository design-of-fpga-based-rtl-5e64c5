// tb_blowfish_chip: end-to-end test of the Blowfish chip at its default
// parameters (divide ratio 4).
//
// For each vector it loads a key through key_load, waits for the expansion to
// finish, encrypts the plaintext and compares with the expected ciphertext,
// then decrypts that ciphertext and compares with the plaintext. The vectors
// include two published Blowfish test vectors with 64-bit keys (all-zero
// key and plaintext -> 4ef997456198dd78; key fedcba9876543210, plaintext
// 0123456789abcdef -> 0aceab0fc6a0a28d) and vectors computed with an
// independent software model for keys of 448, 32 and 128 bits. Key words
// beyond the key length are filled with junk that must not matter.
// Mechanisms exercised and counted, each at least once:
//   - expansion of a 32-bit (minimum) and a 448-bit (maximum) key;
//   - encryption and decryption;
//   - start held high while the keys are being expanded (must stall: no
//     done, ready low, nothing accepted) and before any key was loaded;
//   - key_load offered while a block is being processed (must be refused);
//   - the divided rate: start to done must take 18*CLK_DIV clocks.
module tb_blowfish_chip;
  import bf_pkg::*;

  localparam int unsigned DIV = 4;   // the chip's default CLK_DIV

  typedef struct {
    int          nwords;
    logic [447:0] key;
    block_t      pt;
    block_t      ct;
  } vec_t;

  localparam int NV = 7;
  vec_t vecs [NV] = '{
    '{2, 448'h000000000000000088DBA7925D9A2E00F1D4F93C48D3DE49073B08E376CE1C6C4D75493C673E812F21B24A2CCD45B71AAF6AF3F22C604142, 64'h0000000000000000, 64'h4EF997456198DD78},
    '{2, 448'hFEDCBA9876543210690E08CAA78489B6DA62FEBFC170F1126F24D02DABFD1369D052858998810699A058A028325721E1E137FEF71A8068B6, 64'h0123456789ABCDEF, 64'h0ACEAB0FC6A0A28D},
    '{14, 448'h8E0AF9B764AF29C2123B4826A62553A6E93D19690D45EAB052B53BF7A71B7B948FD0E408A6B5DF7411935E9CA59E9C8B3F0C368236BF46E9, 64'h4A95F7E571756299, 64'h017705BF1B884050},
    '{14, 448'h8E0AF9B764AF29C2123B4826A62553A6E93D19690D45EAB052B53BF7A71B7B948FD0E408A6B5DF7411935E9CA59E9C8B3F0C368236BF46E9, 64'h311787A230D17FAC, 64'h7C1EB6EBB6A9A6D9},
    '{1, 448'h8FAE9B72A99123AC1B3C5EA7F8283EEB79A2CD0A2FB005758B54C183CCF15A8D64DB38DCA3D0C99D9B029AB2AE19EDAB86DAE7D0E9974020, 64'hC71BC8C9F25EEDD9, 64'h2681EBC540B8E28E},
    '{1, 448'h8FAE9B72E7D3E8A60CF3D9FFACD6A68D8A54A45475037734DB9717009AB591D89D214B9A9F3B829AFC22D5A17B168F1BA37A9C90ED0FEE13, 64'h3356ABDF70569F01, 64'hFA11C4D857D12968},
    '{4, 448'hCF03ABBCAEB72BED120B98F53618F5070DC01BC633EAF35287785276FC556E6D13081A73763D11034FCE32DB6D31B48ED5A167C0F8792014, 64'h514DFEE16335E184, 64'h5C2593F14BC3F473}
  };

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  key_t key = '0;
  keylen_t key_words = 4'd1;
  logic key_load = 0, key_load_ready, keys_valid;
  logic start = 0, decrypt = 0, ready, done;
  block_t data_in = '0, data_out;

  blowfish_chip dut (.clk(clk), .rst_n(rst_n), .key(key), .key_words(key_words),
    .key_load(key_load), .key_load_ready(key_load_ready), .keys_valid(keys_valid),
    .start(start), .decrypt(decrypt), .data_in(data_in), .ready(ready),
    .done(done), .data_out(data_out));

  always #5 clk = ~clk;

  int n_key32 = 0, n_key448 = 0, n_key_other = 0, n_enc = 0, n_dec = 0;
  int n_stall_cycles = 0, n_keyload_refused = 0, n_rate_checks = 0;
  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  task automatic load_key(int nw, logic [447:0] k);
    int guard = 0;
    int done0;
    @(negedge clk);
    key = key_t'(k); key_words = keylen_t'(nw); key_load = 1;
    while (!key_load_ready) @(negedge clk);
    @(negedge clk);
    key_load = 0;
    checks++;
    if (keys_valid) begin failures++; $display("FAIL keys_valid stayed high after key_load"); end
    // hold start during the expansion: it must stall
    start = 1; decrypt = 0; data_in = {$urandom(), $urandom()};
    done0 = n_done;
    while (!keys_valid && guard < 100000) begin
      @(posedge clk);
      guard++;
      if (start && !ready) n_stall_cycles++;
      if (ready) begin failures++; $display("FAIL ready during expansion"); end
      if (key_load_ready) begin failures++; $display("FAIL key_load_ready during expansion"); end
      @(negedge clk);
    end
    start = 0;
    checks++;
    if (n_done != done0) begin failures++; $display("FAIL done during expansion"); end
    if (nw == 1) n_key32++; else if (nw == 14) n_key448++; else n_key_other++;
  endtask

  task automatic run_block(block_t in, bit dec, output block_t res);
    int clks = 0;
    @(negedge clk);
    start = 1; decrypt = dec; data_in = in;
    while (!ready) @(negedge clk);
    @(posedge clk);             // taken here
    @(negedge clk);
    start = 0; data_in = {$urandom(), $urandom()}; decrypt = !dec;
    clks = 0;
    // offer a new key while the block is in flight; it must be refused. The
    // offer is withdrawn before the core finishes, since a key offered in the
    // completing cycle is legitimately taken.
    key_load = 1; key = ~key;
    while (!done && clks < 1000) begin
      @(posedge clk);
      clks++;
      if (key_load) begin
        if (key_load_ready) begin failures++; $display("FAIL key_load_ready while block in flight"); end
        else n_keyload_refused++;
      end
      #1;
      if (clks == 16*DIV) key_load = 0;
    end
    key_load = 0;
    res = data_out;
    checks++;
    if (clks != 18*DIV) begin failures++; $display("FAIL start to done took %0d clocks", clks); end
    else n_rate_checks++;
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t r;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // no key yet: a start must wait
    start = 1; data_in = '0;
    repeat (50) begin
      @(posedge clk);
      if (ready) begin failures++; $display("FAIL ready before any key"); end
      if (start && !ready) n_stall_cycles++;
    end
    @(negedge clk) start = 0;
    checks++;
    if (done || keys_valid) begin failures++; $display("FAIL activity before key"); end

    for (int v = 0; v < NV; v++) begin
      load_key(vecs[v].nwords, vecs[v].key);
      run_block(vecs[v].pt, 1'b0, r);
      checks++;
      if (r !== vecs[v].ct) begin
        failures++; $display("FAIL vector %0d encrypt: %h expected %h", v, r, vecs[v].ct);
      end
      run_block(r, 1'b1, r);
      checks++;
      if (r !== vecs[v].pt) begin
        failures++; $display("FAIL vector %0d decrypt: %h expected %h", v, r, vecs[v].pt);
      end
    end

    $display("mechanisms: 32-bit keys %0d, 448-bit keys %0d, other keys %0d, encryptions %0d, decryptions %0d",
             n_key32, n_key448, n_key_other, n_enc, n_dec);
    $display("mechanisms: stalled start cycles %0d, refused key loads %0d, divided-rate latency checks %0d",
             n_stall_cycles, n_keyload_refused, n_rate_checks);
    checks += 8;
    if (n_key32 == 0)           begin failures++; $display("FAIL no 32-bit key expansion"); end
    if (n_key448 == 0)          begin failures++; $display("FAIL no 448-bit key expansion"); end
    if (n_key_other == 0)       begin failures++; $display("FAIL no intermediate key length"); end
    if (n_enc == 0)             begin failures++; $display("FAIL no encryption"); end
    if (n_dec == 0)             begin failures++; $display("FAIL no decryption"); end
    if (n_stall_cycles == 0)    begin failures++; $display("FAIL start never stalled"); end
    if (n_keyload_refused == 0) begin failures++; $display("FAIL key load never refused"); end
    if (n_rate_checks == 0)     begin failures++; $display("FAIL divided rate never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
