// Testbench for ndma_regfile: writes random values to random registers, keeps a
// reference copy, and checks both read ports against it, including that
// register 0 stays zero and that reset clears every register.
`include "tb/ndma_tb.svh"
module ndma_regfile_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [4:0] ra, rb, wa;
  logic [31:0] da, db, wd;
  logic we = 0;
  logic [31:0] ref_r [32];
  always #5 clk = ~clk;
  ndma_regfile dut (.clk, .rst, .rs_addr(ra), .rt_addr(rb), .rs_data(da), .rt_data(db),
                    .we, .rd_addr(wa), .rd_data(wd));
  initial begin
    ra = 0; rb = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 32; i++) ref_r[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1; `CHECK(da, 32'h0, "reset value")
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1; wa = 5'($urandom); wd = $urandom;
      @(posedge clk); #1;
      if (wa != 0) ref_r[wa] = wd;
      we = 0;
      ra = 5'($urandom); rb = 5'($urandom); #1;
      `CHECK(da, ref_r[ra], "rs port")
      `CHECK(db, ref_r[rb], "rt port")
    end
    ra = 0; #1; `CHECK(da, 32'h0, "r0 is zero")
    `TB_DONE
  end
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
endmodule
