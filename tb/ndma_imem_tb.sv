// Testbench for ndma_imem: checks the power-up ID loop image, then writes and
// reads random words, including a write and a read of another word in the same
// cycle (the dual-port property).
`include "tb/ndma_tb.svh"
module ndma_imem_tb;
  import ndma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [9:0] ra, wa;
  logic [31:0] rd, wd;
  logic we = 0;
  logic [31:0] ref_m [1024];
  always #5 clk = ~clk;
  ndma_imem #(.DEPTH(1024), .BOOT_ID(8'd7)) dut (.clk, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd));
  initial begin
    wa = 0; wd = 0;
    for (int i = 0; i < 1024; i++) ref_m[i] = 0;
    ref_m[0] = {6'h30, 26'd7};   // sid 7
    ref_m[3] = {6'h02, 26'd1};   // j 1
    for (int i = 0; i < 8; i++) begin ra = 10'(i); #1; `CHECK(rd, ref_m[i], "boot image") end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1; wa = 10'($urandom); wd = $urandom;
      ra = 10'($urandom); #1;
      `CHECK(rd, ref_m[ra], "read while writing")
      @(posedge clk); #1;
      ref_m[wa] = wd; we = 0;
      ra = wa; #1; `CHECK(rd, wd, "read back")
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
