// tb_bf_subkey_store: fills all 1042 sub-key words through the linear write
// address with random values, then reads every P entry through both P ports
// and every S-box entry through the four S-box ports (all four at the same
// index, then at independent indices), comparing with the address map
// P1..P18 = 0..17, S-box b entry i = 18 + 256*(b-1) + i. Writes past 1041
// must not disturb anything.
module tb_bf_subkey_store;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  skaddr_t waddr = '0;
  word_t wdata = '0;
  pidx_t pa = '0, pb = '0;
  word_t da, db;
  sidx_t [SBOX_COUNT-1:0] sidx = '0;
  word_t [SBOX_COUNT-1:0] sdata;
  word_t shadow [SUBKEY_WORDS];

  bf_subkey_store dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .p_idx_a(pa), .p_data_a(da), .p_idx_b(pb), .p_data_b(db),
    .sbox_idx(sidx), .sbox_data(sdata));

  always #5 clk = ~clk;

  task automatic check_s();
    #1;
    for (int b = 0; b < SBOX_COUNT; b++) begin
      checks++;
      if (sdata[b] !== shadow[P_ENTRIES + SBOX_ENTRIES*b + int'(sidx[b])]) begin
        failures++; $display("FAIL S%0d[%0d]=%h", b+1, sidx[b], sdata[b]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < SUBKEY_WORDS; a++) begin
      @(negedge clk); we = 1; waddr = skaddr_t'(a); wdata = $urandom(); shadow[a] = wdata;
    end
    // out-of-range writes
    for (int a = SUBKEY_WORDS; a < 2048; a += 97) begin
      @(negedge clk); we = 1; waddr = skaddr_t'(a); wdata = $urandom();
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < P_ENTRIES; i++) begin
      pa = pidx_t'(i); pb = pidx_t'(P_ENTRIES - 1 - i); #1;
      checks += 2;
      if (da !== shadow[i]) begin failures++; $display("FAIL P%0d port A", i+1); end
      if (db !== shadow[P_ENTRIES-1-i]) begin failures++; $display("FAIL P%0d port B", P_ENTRIES-i); end
    end
    for (int i = 0; i < SBOX_ENTRIES; i++) begin
      for (int b = 0; b < SBOX_COUNT; b++) sidx[b] = sidx_t'(i);
      check_s();
    end
    for (int n = 0; n < 500; n++) begin
      for (int b = 0; b < SBOX_COUNT; b++) sidx[b] = sidx_t'($urandom());
      check_s();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
