// tb_bf_sbox: writes random words to random entries of one S-box and reads
// them back through the asynchronous port, against a shadow copy kept here.
// Also checks that a write lands at the clock edge and not before.
module tb_bf_sbox;
  import bf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  sidx_t waddr = '0, raddr = '0;
  word_t wdata = '0, rdata;
  word_t shadow [SBOX_ENTRIES];

  bf_sbox dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every entry
    for (int i = 0; i < SBOX_ENTRIES; i++) begin
      @(negedge clk); we = 1; waddr = sidx_t'(i); wdata = $urandom(); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < SBOX_ENTRIES; i++) begin
      raddr = sidx_t'(i); #1; checks++;
      if (rdata !== shadow[i]) begin failures++; $display("FAIL [%0d] %h exp %h", i, rdata, shadow[i]); end
    end
    // random overwrites, with read-back and timing of the write
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1; waddr = sidx_t'($urandom()); wdata = $urandom(); raddr = waddr; #1;
      checks++;
      if (rdata !== shadow[waddr]) begin failures++; $display("FAIL early write at %0d", waddr); end
      @(posedge clk); #1;
      shadow[waddr] = wdata;
      checks++;
      if (rdata !== wdata) begin failures++; $display("FAIL write at %0d: %h exp %h", waddr, rdata, wdata); end
      we = 0;
      raddr = sidx_t'($urandom()); #1; checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL read at %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
