// tb_bf_f_function: checks the Blowfish F function against its definition.
// Four random 256-entry tables stand in for the S-boxes; the testbench
// answers the block's lookups from them and compares F with
// ((S1[a] + S2[b]) ^ S3[c]) + S4[d] computed here, a = most significant
// byte. Includes inputs that make both additions carry out of 32 bits.
module tb_bf_f_function;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  word_t x, f;
  sidx_t [SBOX_COUNT-1:0] idx;
  word_t [SBOX_COUNT-1:0] data;
  word_t tbl [SBOX_COUNT][SBOX_ENTRIES];

  bf_f_function dut (.x(x), .sbox_idx(idx), .sbox_data(data), .f(f));

  always_comb
    for (int b = 0; b < SBOX_COUNT; b++) data[b] = tbl[b][idx[b]];

  function automatic word_t ref_f(word_t v);
    logic [32:0] s;
    s = {1'b0, tbl[0][v[31:24]]} + {1'b0, tbl[1][v[23:16]]};
    s = {1'b0, s[31:0] ^ tbl[2][v[15:8]]} + {1'b0, tbl[3][v[7:0]]};
    return s[31:0];
  endfunction

  task automatic check(word_t v);
    x = v;
    #1;
    checks++;
    if (f !== ref_f(v)) begin
      failures++;
      $display("FAIL x=%h f=%h exp=%h", v, f, ref_f(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < SBOX_COUNT; b++)
      for (int i = 0; i < SBOX_ENTRIES; i++) tbl[b][i] = $urandom();
    // carries in both additions
    tbl[0][8'h12] = 32'hffff_ffff; tbl[1][8'h34] = 32'h0000_0002;
    tbl[2][8'h56] = 32'h0f0f_0f0f; tbl[3][8'h78] = 32'hffff_fff0;
    check(32'h1234_5678);
    // each byte reaches its own S-box
    check(32'h0000_0000);
    check(32'hff00_0000);
    check(32'h00ff_0000);
    check(32'h0000_ff00);
    check(32'h0000_00ff);
    for (int n = 0; n < 2000; n++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
