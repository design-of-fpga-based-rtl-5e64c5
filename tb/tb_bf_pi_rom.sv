// tb_bf_pi_rom: computes the hexadecimal digits of pi here and compares all
// 1042 words of the initial-value table with them.
//
// pi = 16*atan(1/5) - 4*atan(1/239) (Machin), evaluated in fixed point on
// arrays of 32-bit limbs: limb 0 is the integer part, limb n (n >= 1) holds
// fraction hex digits 8n-7 .. 8n, so limb n+1 must equal table word n.
// Three guard limbs absorb the truncation of the series. Also checks the
// words printed in the algorithm description: P1..P4 = 243f6a88, 85a308d3,
// 13198a2e, 03707344 and S-box 4 entries 254, 255 = 578fdfe3, 3ac372e6.
module tb_bf_pi_rom;
  import bf_pkg::*;

  localparam int NL = SUBKEY_WORDS + 4;

  int checks = 0, failures = 0;
  skaddr_t addr = '0;
  word_t data;

  bf_pi_rom dut (.addr(addr), .data(data));

  bit [31:0] pos [NL];   // sum of positive terms
  bit [31:0] neg [NL];   // sum of negative terms
  bit [31:0] t   [NL];   // current power c/x^(2k+1)
  bit [31:0] q   [NL];   // t / (2k+1)

  function automatic void div_small(ref bit [31:0] src [NL], ref bit [31:0] dst [NL], input int unsigned d);
    longint unsigned rem = 0, cur;
    for (int i = 0; i < NL; i++) begin
      cur    = (rem << 32) | longint'(src[i]);
      dst[i] = 32'(cur / d);
      rem    = cur % d;
    end
  endfunction

  function automatic void add_to(ref bit [31:0] dst [NL], ref bit [31:0] src [NL]);
    longint unsigned s, c = 0;
    for (int i = NL - 1; i >= 0; i--) begin
      s = longint'(dst[i]) + longint'(src[i]) + c;
      dst[i] = s[31:0];
      c = s >> 32;
    end
  endfunction

  function automatic void sub_from(ref bit [31:0] dst [NL], ref bit [31:0] src [NL]);
    longint s;
    int b = 0;
    for (int i = NL - 1; i >= 0; i--) begin
      s = longint'(dst[i]) - longint'(src[i]) - b;
      b = (s < 0) ? 1 : 0;
      dst[i] = 32'(s);
    end
  endfunction

  function automatic bit is_zero(ref bit [31:0] a [NL]);
    for (int i = 0; i < NL; i++) if (a[i] != 0) return 0;
    return 1;
  endfunction

  // adds c*atan(1/x) into pos/neg
  function automatic void atan_series(int unsigned c, int unsigned x);
    int unsigned k = 0;
    for (int i = 0; i < NL; i++) t[i] = 0;
    t[0] = c;
    div_small(t, t, x);
    while (!is_zero(t)) begin
      div_small(t, q, 2*k + 1);
      if (k % 2 == 0) add_to(pos, q); else add_to(neg, q);
      div_small(t, t, x * x);
      k++;
    end
  endfunction

  task automatic expect_word(int a, word_t v, string what);
    addr = skaddr_t'(a); #1; checks++;
    if (data !== v) begin failures++; $display("FAIL %s: word %0d = %h, expected %h", what, a, data, v); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NL; i++) begin pos[i] = 0; neg[i] = 0; end
    atan_series(16, 5);
    // -4*atan(1/239): swap the roles of the two sums
    begin
      bit [31:0] tmp [NL];
      for (int i = 0; i < NL; i++) begin tmp[i] = pos[i]; pos[i] = neg[i]; neg[i] = tmp[i]; end
      atan_series(4, 239);
      for (int i = 0; i < NL; i++) begin tmp[i] = pos[i]; pos[i] = neg[i]; neg[i] = tmp[i]; end
    end
    sub_from(pos, neg);   // pos now holds pi
    checks++;
    if (pos[0] != 3) begin failures++; $display("FAIL integer part %0d", pos[0]); end

    for (int a = 0; a < SUBKEY_WORDS; a++) expect_word(a, pos[a+1], "pi digits");

    expect_word(0, 32'h243f6a88, "P1");
    expect_word(1, 32'h85a308d3, "P2");
    expect_word(2, 32'h13198a2e, "P3");
    expect_word(3, 32'h03707344, "P4");
    expect_word(SUBKEY_WORDS - 2, 32'h578fdfe3, "S4[254]");
    expect_word(SUBKEY_WORDS - 1, 32'h3ac372e6, "S4[255]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
