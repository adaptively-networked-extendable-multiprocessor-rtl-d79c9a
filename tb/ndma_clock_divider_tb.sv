// Testbench for ndma_clock_divider: instantiates the divider with DIV = 9
// (the default), 2, 4 and 1 from one input clock. For each output it counts the
// input clocks between rising edges and the high time of each output period
// over 20 periods and checks them against DIV and DIV/2 (the pass-through
// output must follow the input on every edge). The first output period is
// skipped, because the counters start from arbitrary values.
`include "tb/ndma_tb.svh"
module ndma_clock_divider_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic o9, o2, o4, o1;
  always #5 clk = ~clk;

  ndma_clock_divider          u9 (.clk_in(clk), .clk_out(o9));
  ndma_clock_divider #(.DIV(2)) u2 (.clk_in(clk), .clk_out(o2));
  ndma_clock_divider #(.DIV(4)) u4 (.clk_in(clk), .clk_out(o4));
  ndma_clock_divider #(.DIV(1)) u1 (.clk_in(clk), .clk_out(o1));

  // input clocks per output period and per high phase, measured at each rise
  task automatic measure(ref logic o, input int div, input string name);
    int period, high;
    @(posedge o);
    repeat (20) begin
      period = 0; high = 1;   // high from the rising edge to the next input edge
      do begin
        @(posedge clk); #1;
        period++;
        if (o) high++;
      end while (o);
      while (!o) begin @(posedge clk); #1; period++; end
      `CHECK(period, div, {name, " period in input clocks"})
      `CHECK(high, div / 2, {name, " high time in input clocks"})
    end
  endtask

  initial begin
    fork
      measure(o9, 9, "DIV=9");
      measure(o2, 2, "DIV=2");
      measure(o4, 4, "DIV=4");
      repeat (40) begin
        @(posedge clk); #1; `CHECK(o1, 1'b1, "DIV=1 follows a rising edge")
        @(negedge clk); #1; `CHECK(o1, 1'b0, "DIV=1 follows a falling edge")
      end
    join
    `TB_DONE
  end

  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
