// tb_blowfish_key_lengths: every supported key length, 32 to 448 bits in
// steps of 32, through the whole chip at its default parameters. For each
// length n = 1..14 it loads an n-word key, encrypts one block and compares
// with the expected ciphertext, then decrypts it back. Expected values were
// produced by an independent software model of Blowfish that reproduces the
// published test vectors. Between keys it checks that keys_valid drops on
// key_load and that the expansion takes the same number of clocks whatever
// the key length.
module tb_blowfish_key_lengths;
  import bf_pkg::*;

  typedef struct {
    int           nwords;
    logic [447:0] key;
    block_t       pt;
    block_t       ct;
  } vec_t;

  localparam int NV = 14;
  vec_t vecs [NV] = '{
    '{1, 448'h47C6B78B00000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 64'h1E33C6BD3FC32FEC, 64'h494AD3E429BC136A},
    '{2, 448'hF28406874B445712000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 64'h007CBAE22854C419, 64'hA01396B8415A59C2},
    '{3, 448'hCE2C324395699D7B8CB9E8460000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 64'h6D736E23586D9896, 64'h16B91BA52332F478},
    '{4, 448'hE7F30940AEE356F21E09E2D4D4F9CE4C00000000000000000000000000000000000000000000000000000000000000000000000000000000, 64'h315631D29EE1FAF4, 64'h47BC377E9CE3B7D3},
    '{5, 448'hC7FC64C1EE1A36A6F6C522CA821B4A5B58E330B1000000000000000000000000000000000000000000000000000000000000000000000000, 64'hB71E08DE500B9AC9, 64'h7A582C8DC577045C},
    '{6, 448'h5AD29D3656A42024D0355401F457DA87CE0D9682783096EA0000000000000000000000000000000000000000000000000000000000000000, 64'h4E54FE18E75592EC, 64'hAE011EF7EAFD6F5D},
    '{7, 448'hDC5A58AA8D521B0F3CE98FC9F8766F195B68F07968933B5CCE72A5DD00000000000000000000000000000000000000000000000000000000, 64'hC59E8E6F582D396B, 64'hD3CA3D0108A7D173},
    '{8, 448'hFD97EBA51E526F63885299DCCE39FECF9B6DE4BFBF6DD209DA2D87C40FBBF428000000000000000000000000000000000000000000000000, 64'hB7EFAD4BBBB7D1C8, 64'hC84D7AEE8FE4EF52},
    '{9, 448'hF97B1D31C95480D0018292E248FCD4865A85EBE2FCD6918E30D8FDA39B210219CBFC8D010000000000000000000000000000000000000000, 64'hAF3B6639EF299A39, 64'h2B2AB0CC4B98A158},
    '{10, 448'h83BE074B02307F0EFA7FE0C2B375223C9AC76F52E140D8233606AA122D40A59ABB888CC2EAE1EEDB00000000000000000000000000000000, 64'h2619867E8FA57147, 64'h00475F5A80501969},
    '{11, 448'h46225EBAFB5978826AFC0080A2D0BC086D481B4B6860F49A73764F63C2A1B948EC5CF6C6F846EB96641C11F7000000000000000000000000, 64'h1DFC03DD5C4B2287, 64'h515BD38232DB6FCE},
    '{12, 448'h07329C4F6EB37823039C2BD95A640B18860B13F3351FBF8E63B0969ABE4D2B7307C7C6EDDC5F169AC0C64F35620F48930000000000000000, 64'hC7CF565EABFB5563, 64'hBB77980EC484A15F},
    '{13, 448'h9DA64DB2D561A120C699E329DC444E7A3CD675EDABB1AB1D0A9987C55E8370E28F69CCA54A8FFB41317E1F124A59C12D3359680000000000, 64'hF4EEE8EE818FEB12, 64'h50664C9A9035B67D},
    '{14, 448'hC51BAF7AB979B2CC0536B37E80B46AC68300EEDB3E20D19BAB3EE2D89D38A5A4CD2AE2C2FB7240AFB4724B15E4BBF0DD7F2F45927ED91B3F, 64'h2CD70AEB5490F822, 64'hBE375DE102CC89FD}
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

  task automatic load_key(int nw, logic [447:0] k, output int clks);
    @(negedge clk);
    key = key_t'(k); key_words = keylen_t'(nw); key_load = 1;
    while (!key_load_ready) @(negedge clk);
    @(posedge clk);
    #1;
    key_load = 0;
    checks++;
    if (keys_valid) begin failures++; $display("FAIL keys_valid high after key_load"); end
    clks = 0;
    while (!keys_valid && clks < 100000) begin @(posedge clk); #1; clks++; end
  endtask

  task automatic run_block(block_t in, bit dec, output block_t res);
    int guard = 0;
    @(negedge clk);
    start = 1; decrypt = dec; data_in = in;
    while (!ready) @(negedge clk);
    @(posedge clk);
    #1;
    start = 0;
    while (!done && guard < 1000) begin @(posedge clk); #1; guard++; end
    res = data_out;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t r;
    int clks, clks0 = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      load_key(vecs[v].nwords, vecs[v].key, clks);
      checks++;
      if (clks0 < 0) clks0 = clks;
      else if (clks != clks0) begin
        failures++; $display("FAIL %0d-word key expanded in %0d clocks, first key took %0d", vecs[v].nwords, clks, clks0);
      end
      run_block(vecs[v].pt, 1'b0, r);
      checks++;
      if (r !== vecs[v].ct) begin
        failures++; $display("FAIL %0d-bit key encrypt: %h expected %h", 32*vecs[v].nwords, r, vecs[v].ct);
      end
      run_block(r, 1'b1, r);
      checks++;
      if (r !== vecs[v].pt) begin
        failures++; $display("FAIL %0d-bit key decrypt: %h expected %h", 32*vecs[v].nwords, r, vecs[v].pt);
      end
    end
    $display("key expansion: %0d clocks", clks0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
