// Testbench for ndma_net_rx: sends random words as four bytes, most significant
// first, with random gaps, and checks that each completed word appears once, one
// cycle after its last byte.
`include "tb/ndma_tb.svh"
module ndma_net_rx_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rxv = 0;
  logic [7:0] rxd = 0;
  logic iv;
  logic [31:0] iw;
  int words = 0;
  always #5 clk = ~clk;
  ndma_net_rx dut (.clk, .rst, .rx_valid(rxv), .rx_data(rxd), .instr_valid(iv), .instr(iw));
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] w;
      w = $urandom;
      for (int b = 3; b >= 0; b--) begin
        @(negedge clk); rxv = 1; rxd = w[8*b +: 8];
        @(posedge clk); #1; rxv = 0;
        if (b != 0) `CHECK(iv, 1'b0, "no word before 4th byte")
        else begin
          `CHECK(iv, 1'b1, "word valid after 4th byte")
          `CHECK(iw, w, "assembled word")
        end
        repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; `CHECK(iv, 1'b0, "single pulse") end
      end
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
