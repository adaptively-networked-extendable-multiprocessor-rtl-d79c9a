// ndma_clock_divider: derives the processor clock from the board clock by
// counting.
//
// A counter runs from 0 to DIV-1 on every rising edge of clk_in and wraps.
// The output clock is high while the count is below DIV/2 and low for the rest,
// so one output period is DIV input periods (with DIV = 9, 4 high and 5 low,
// 27 MHz in and 3 MHz out). The output comes straight from a flip-flop, so it
// has no glitches; its rising edge follows the clk_in edge where the count
// wraps to 0. DIV = 1 passes clk_in through unchanged.
//
// Interface: clk_in (board clock), clk_out (divided clock). There is no reset:
// the counter runs from power-up, so the divided clock keeps running while the
// logic it drives is held in reset. A counter that powers up outside 0..DIV-1
// wraps to 0 on the next edge.
//
// Counting the board clock to 9 to clock the CPUs at 3 MHz follows the
// architecture; the duty cycle, the missing reset and the DIV = 1 pass-through
// are this design's choices.
module ndma_clock_divider #(
  parameter int unsigned DIV = 9
) (
  input  logic clk_in,
  output logic clk_out
);
  if (DIV <= 1) begin : g_pass
    assign clk_out = clk_in;
  end else begin : g_div
    localparam int unsigned CW = $clog2(DIV);
    logic [CW-1:0] cnt;
    logic          q;

    always_ff @(posedge clk_in) begin
      if (cnt >= CW'(DIV - 1)) begin
        cnt <= '0;
        q   <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        q   <= (cnt + 1'b1) < CW'(DIV / 2);
      end
    end

    assign clk_out = q;
  end
endmodule
