// tb_bf_parray: writes random words to P1..P18 and reads them back through
// both read ports at independent indices, against a shadow copy. Writes to
// indices 18..31 must change nothing, and reads there return zero.
module tb_bf_parray;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  pidx_t waddr = '0, ra = '0, rb = '0;
  word_t wdata = '0, da, db;
  word_t shadow [P_ENTRIES];

  bf_parray dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                 .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;

  function automatic word_t exp_rd(pidx_t i);
    return (i < pidx_t'(P_ENTRIES)) ? shadow[i] : '0;
  endfunction

  task automatic check_reads();
    for (int n = 0; n < 8; n++) begin
      ra = pidx_t'($urandom()); rb = pidx_t'($urandom()); #1;
      checks += 2;
      if (da !== exp_rd(ra)) begin failures++; $display("FAIL A[%0d]=%h exp %h", ra, da, exp_rd(ra)); end
      if (db !== exp_rd(rb)) begin failures++; $display("FAIL B[%0d]=%h exp %h", rb, db, exp_rd(rb)); end
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
    for (int i = 0; i < P_ENTRIES; i++) begin
      @(negedge clk); we = 1; waddr = pidx_t'(i); wdata = $urandom(); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < P_ENTRIES; i++) begin
      ra = pidx_t'(i); rb = pidx_t'(P_ENTRIES - 1 - i); #1;
      checks += 2;
      if (da !== shadow[i]) begin failures++; $display("FAIL A[%0d]", i); end
      if (db !== shadow[P_ENTRIES-1-i]) begin failures++; $display("FAIL B[%0d]", P_ENTRIES-1-i); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1; waddr = pidx_t'($urandom()); wdata = $urandom();
      @(posedge clk); #1;
      if (waddr < pidx_t'(P_ENTRIES)) shadow[waddr] = wdata;
      we = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
