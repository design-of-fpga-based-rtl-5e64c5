// tb_bf_freq_div: for divide ratios 1, 3 and 4, counts clocks between ticks
// after reset. The first tick must come in the DIV-th clock after reset is
// released and every later one exactly DIV clocks after the previous.
module tb_bf_freq_div;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic t1, t3, t4;

  bf_freq_div #(.DIV(1)) d1 (.clk(clk), .rst_n(rst_n), .tick(t1));
  bf_freq_div #(.DIV(3)) d3 (.clk(clk), .rst_n(rst_n), .tick(t3));
  bf_freq_div            d4 (.clk(clk), .rst_n(rst_n), .tick(t4));

  always #5 clk = ~clk;

  int cyc = 0;
  int last1 = 0, last3 = 0, last4 = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (t1) begin checks++; if (cyc - last1 != 1) begin failures++; $display("FAIL div1 gap %0d", cyc-last1); end last1 = cyc; end
    if (t3) begin checks++; if (cyc - last3 != 3) begin failures++; $display("FAIL div3 gap %0d", cyc-last3); end last3 = cyc; end
    if (t4) begin checks++; if (cyc - last4 != 4) begin failures++; $display("FAIL div4 gap %0d", cyc-last4); end last4 = cyc; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (120) @(posedge clk);
    #1;
    checks += 3;
    if (last1 != 120) begin failures++; $display("FAIL div1 count %0d", last1); end
    if (last3 != 120) begin failures++; $display("FAIL div3 count %0d", last3); end
    if (last4 != 120) begin failures++; $display("FAIL div4 count %0d", last4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
