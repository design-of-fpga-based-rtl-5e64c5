// tb_bf_round: checks one Blowfish round. Random tables stand in for the
// S-boxes; for random halves and round keys the outputs must be
// l_out = r_in ^ F(l_in ^ p) and r_out = l_in ^ p, with F computed here.
module tb_bf_round;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  word_t l_in, r_in, p, l_out, r_out;
  sidx_t [SBOX_COUNT-1:0] idx;
  word_t [SBOX_COUNT-1:0] data;
  word_t tbl [SBOX_COUNT][SBOX_ENTRIES];

  bf_round dut (.l_in(l_in), .r_in(r_in), .p_key(p), .sbox_idx(idx),
                .sbox_data(data), .l_out(l_out), .r_out(r_out));

  always_comb
    for (int b = 0; b < SBOX_COUNT; b++) data[b] = tbl[b][idx[b]];

  function automatic word_t ref_f(word_t v);
    return ((tbl[0][v[31:24]] + tbl[1][v[23:16]]) ^ tbl[2][v[15:8]]) + tbl[3][v[7:0]];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t xl;
    for (int b = 0; b < SBOX_COUNT; b++)
      for (int i = 0; i < SBOX_ENTRIES; i++) tbl[b][i] = $urandom();
    for (int n = 0; n < 2000; n++) begin
      l_in = $urandom(); r_in = $urandom(); p = $urandom();
      #1;
      xl = l_in ^ p;
      checks += 2;
      if (r_out !== xl) begin
        failures++; $display("FAIL r_out=%h exp=%h", r_out, xl);
      end
      if (l_out !== (r_in ^ ref_f(xl))) begin
        failures++; $display("FAIL l_out=%h exp=%h", l_out, r_in ^ ref_f(xl));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
