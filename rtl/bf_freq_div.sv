// bf_freq_div: frequency divider for the chip's sequencing logic.
//
// Produces a one-clock-wide enable pulse every DIV clocks (tick = 1 in
// every clock when DIV is 1). All state in the chip advances only on a tick,
// so the design steps at clk/DIV while staying in a single clock domain,
// which is how this design lowers the effective operating rate to cover a
// slow critical path on the target board. A divided-down sequencing rate is
// the original design's approach; generating it as a clock enable rather than a
// derived clock, and the default ratio of 4, are this design's choices.
// After reset the first tick comes in the DIV-th clock.
module bf_freq_div #(
  parameter int unsigned DIV = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  if (DIV <= 1) begin : g_nodiv
    assign tick = 1'b1;
  end else begin : g_div
    logic [CW-1:0] cnt_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                       cnt_q <= '0;
      else if (cnt_q == CW'(DIV - 1))   cnt_q <= '0;
      else                              cnt_q <= cnt_q + CW'(1);
    end
    assign tick = (cnt_q == CW'(DIV - 1));
  end

endmodule
