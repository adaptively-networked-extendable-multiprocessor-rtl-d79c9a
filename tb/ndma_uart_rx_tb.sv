// Testbench for ndma_uart_rx: serialises random bytes as 8N1 frames at the
// configured bit time and checks each received byte and its timing, and that a
// frame with a bad stop bit is dropped.
`include "tb/ndma_tb.svh"
module ndma_uart_rx_tb;
  localparam int CLK_HZ = 1_000_000, BAUD = 62_500, CPB = CLK_HZ / BAUD;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rxd = 1, v;
  logic [7:0] d;
  int got = 0;
  logic [7:0] last;
  always #5 clk = ~clk;
  ndma_uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst, .rxd, .valid(v), .data(d));
  always @(posedge clk) if (v) begin got++; last = d; end
  task automatic frame(logic [7:0] b, logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); rst <= 0; repeat (5) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b; int g0;
      b = 8'($urandom); g0 = got;
      frame(b, 1);
      `CHECK(got, g0 + 1, "one byte per frame")
      `CHECK(last, b, "byte value")
    end
    begin int g0; g0 = got; frame(8'h5A, 0); `CHECK(got, g0, "bad stop bit dropped") end
    `TB_DONE
  end
  initial begin #2000000; failures++; $display("watchdog"); `TB_DONE end
endmodule
