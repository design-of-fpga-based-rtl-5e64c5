// tb_bf_cipher_core: runs the 16-round datapath against a reference model
// written here from the algorithm: for i = 1..16 XL ^= Pi, XR ^= F(XL),
// swap; undo the last swap; XR ^= P17, XL ^= P18. Decryption uses P18..P1.
// Random P-array and S-box contents are held in the testbench and served to
// the core's read ports. Checks every result, that decrypting the result
// returns the plaintext, that done comes exactly 18 enabled cycles after
// start (with en always high and with en pulsing one clock in three), and
// that dout holds between blocks.
module tb_bf_cipher_core;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 1, start = 0, decrypt = 0;
  block_t din = '0, dout;
  logic done, idle;
  pidx_t pa, pb;
  word_t da, db;
  sidx_t [SBOX_COUNT-1:0] sidx;
  word_t [SBOX_COUNT-1:0] sdata;

  word_t P [P_ENTRIES];
  word_t S [SBOX_COUNT][SBOX_ENTRIES];

  bf_cipher_core dut (.clk(clk), .rst_n(rst_n), .en(en), .start(start), .decrypt(decrypt),
    .din(din), .dout(dout), .done(done), .idle(idle),
    .p_idx_a(pa), .p_data_a(da), .p_idx_b(pb), .p_data_b(db),
    .sbox_idx(sidx), .sbox_data(sdata));

  assign da = (pa < pidx_t'(P_ENTRIES)) ? P[pa] : 32'hdead_beef;
  assign db = (pb < pidx_t'(P_ENTRIES)) ? P[pb] : 32'hdead_beef;
  always_comb for (int b = 0; b < SBOX_COUNT; b++) sdata[b] = S[b][sidx[b]];

  always #5 clk = ~clk;

  function automatic word_t ref_f(word_t x);
    return ((S[0][x[31:24]] + S[1][x[23:16]]) ^ S[2][x[15:8]]) + S[3][x[7:0]];
  endfunction

  function automatic block_t ref_cipher(block_t blk, bit dec);
    word_t l = blk[63:32], r = blk[31:0], t;
    for (int i = 0; i < N_ROUNDS; i++) begin
      l ^= P[dec ? 17 - i : i];
      r ^= ref_f(l);
      t = l; l = r; r = t;
    end
    t = l; l = r; r = t;
    r ^= P[dec ? 1 : 16];
    l ^= P[dec ? 0 : 17];
    return {l, r};
  endfunction

  int en_mode = 0;   // 0: en always high, 1: en one clock in three
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase == 2) ? 0 : phase + 1;
  end
  always_comb en = (en_mode == 0) ? 1'b1 : (phase == 2);

  // run one block and return result and enabled-cycle latency
  task automatic run(block_t in, bit dec, output block_t res, output int lat);
    // present start until an enabled edge takes it
    @(negedge clk);
    while (!(en && idle)) @(negedge clk);
    start = 1; decrypt = dec; din = in;
    @(posedge clk);
    @(negedge clk);
    start = 0; din = $urandom(); decrypt = $urandom();
    lat = 0;
    forever begin
      @(posedge clk);
      if (en) begin
        lat++;
        if (done) break;
        if (lat > 100) break;
      end
    end
    res = dout;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t pt, ct, back, exp;
    int lat;
    for (int i = 0; i < P_ENTRIES; i++) P[i] = $urandom();
    for (int b = 0; b < SBOX_COUNT; b++) for (int i = 0; i < SBOX_ENTRIES; i++) S[b][i] = $urandom();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      en_mode = m;
      for (int n = 0; n < 150; n++) begin
        pt = {$urandom(), $urandom()};
        if (n == 0) pt = '0;
        exp = ref_cipher(pt, 0);
        run(pt, 0, ct, lat);
        checks += 2;
        if (ct !== exp) begin failures++; $display("FAIL enc %h -> %h exp %h", pt, ct, exp); end
        if (lat != 18) begin failures++; $display("FAIL enc latency %0d", lat); end
        // dout holds while idle
        repeat (7) @(posedge clk);
        checks++;
        if (dout !== ct) begin failures++; $display("FAIL dout not held"); end
        run(ct, 1, back, lat);
        checks += 3;
        if (back !== pt) begin failures++; $display("FAIL dec %h -> %h exp %h", ct, back, pt); end
        if (back !== ref_cipher(ct, 1)) begin failures++; $display("FAIL dec vs model"); end
        if (lat != 18) begin failures++; $display("FAIL dec latency %0d", lat); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
