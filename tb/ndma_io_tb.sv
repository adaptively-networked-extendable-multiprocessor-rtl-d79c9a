// Testbench for ndma_io: random OUT writes to random ports checked against a
// reference, and IN reads of each input port.
`include "tb/ndma_tb.svh"
module ndma_io_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [2:0] port;
  logic we = 0;
  logic [31:0] od, id;
  logic [7:0][31:0] inp, outp, ref_o;
  always #5 clk = ~clk;
  ndma_io #(.NPORTS(8)) dut (.clk, .rst, .port, .out_we(we), .out_data(od), .in_data(id),
                             .in_ports(inp), .out_ports(outp));
  initial begin
    port = 0; od = 0;
    for (int i = 0; i < 8; i++) inp[i] = $urandom;
    repeat (2) @(posedge clk); rst <= 0; #1;
    ref_o = '0;
    `CHECK(outp, ref_o, "reset")
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      port = 3'($urandom); we = ($urandom_range(0, 2) != 0); od = $urandom;
      #1; `CHECK(id, inp[port], "in port")
      @(posedge clk); #1;
      if (we) ref_o[port] = od;
      we = 0;
      `CHECK(outp, ref_o, "out ports")
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
