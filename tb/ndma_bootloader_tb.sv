// Testbench for ndma_bootloader: streams random words as bytes (most
// significant first) while boot_mode is high, and checks every memory write,
// its address, the hold of the core and the restart at address 0.
`include "tb/ndma_tb.svh"
module ndma_bootloader_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, bm = 0, bv = 0, we, hold;
  logic [7:0] bd = 0;
  logic [9:0] addr;
  logic [31:0] data;
  logic [10:0] nw;
  logic [31:0] words [64];
  int nwr = 0;
  always #5 clk = ~clk;
  ndma_bootloader #(.AW(10)) dut (.clk, .rst, .boot_mode(bm), .byte_valid(bv), .byte_data(bd),
    .imem_we(we), .imem_addr(addr), .imem_data(data), .cpu_hold(hold), .words_loaded(nw));
  always @(posedge clk) if (we && !rst) begin
    `CHECK(int'(addr), nwr % 64, "write address")
    `CHECK(data, words[nwr % 64], "write data")
    nwr++;
  end
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 64; i++) words[i] = $urandom;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); bm = 1; #1; `CHECK(hold, 1'b1, "core held while loading")
      for (int i = 0; i < 64; i++)
        for (int b = 3; b >= 0; b--) begin
          @(negedge clk); bv = 1; bd = words[i][8*b +: 8]; @(negedge clk); bv = 0;
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      repeat (3) @(negedge clk);
      `CHECK(nwr, 64 * (pass + 1), "all words written")
      bm = 0; #1; `CHECK(hold, 1'b0, "core released")
      repeat (3) @(negedge clk);
    end
    `CHECK(int'(nw), 128, "word count")
    `TB_DONE
  end
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
endmodule
