// Testbench for ndma_dmem: random writes kept in a reference array, and reads
// checked against it; unwritten lines must read zero.
`include "tb/ndma_tb.svh"
module ndma_dmem_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [9:0] a;
  logic [31:0] rd, wd;
  logic we = 0;
  logic [31:0] ref_m [1024];
  always #5 clk = ~clk;
  ndma_dmem #(.DEPTH(1024)) dut (.clk, .addr(a), .rdata(rd), .we, .wdata(wd));
  initial begin
    wd = 0;
    for (int i = 0; i < 1024; i++) ref_m[i] = 0;
    a = 10'd1023; #1; `CHECK(rd, 32'h0, "initial zero")
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      a = 10'($urandom); we = ($urandom_range(0, 1) == 1); wd = $urandom;
      #1; `CHECK(rd, ref_m[a], "read")
      @(posedge clk); #1;
      if (we) ref_m[a] = wd;
      we = 0; #1;
      `CHECK(rd, ref_m[a], "read after write")
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
