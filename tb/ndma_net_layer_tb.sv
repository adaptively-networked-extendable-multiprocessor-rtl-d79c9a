// Testbench for ndma_net_layer: one node with its four buses driven directly.
// Checks the node's own send on all four buses, the wave rule (east/west
// travellers go straight and branch north and south, north/south travellers go
// straight only), delivery and absorption of messages for this node, broadcast
// delivery and forwarding, the age limit, collisions, and the register-thru
// switch once the threshold of passing messages is reached.
`include "tb/ndma_tb.svh"
module ndma_net_layer_tb;
  import ndma_pkg::*;
  localparam int TH = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] my_id = 8'd7;
  msg_t in_bus [4], out_bus [4];
  logic txv = 0, txr, rxv, coll;
  logic [7:0] txd = 0, txdat = 0, rxd, rxo;
  logic [3:0] thru;
  always #5 clk = ~clk;
  ndma_net_layer #(.THRESH(TH)) dut (.clk, .rst, .my_id, .in_bus, .out_bus, .tx_valid(txv),
    .tx_dest(txd), .tx_data(txdat), .tx_ready(txr), .rx_valid(rxv), .rx_data(rxd), .rx_orig(rxo),
    .collision(coll), .thru);

  function automatic msg_t mk(int dst, int age);
    msg_t m; m = '0; m.dest = 8'(dst); m.data = 8'($urandom); m.orig = 8'd2; m.age = 4'(age);
    return m;
  endfunction
  task automatic clear_in();
    for (int s = 0; s < 4; s++) in_bus[s] = '0;
  endtask
  // drive one message on side s for one cycle; check delivery in that cycle,
  // then the outputs one cycle later against the expected set of sides
  task automatic pass(int s, msg_t m, logic exp_rx, logic [3:0] exp_out);
    @(negedge clk); clear_in(); in_bus[s] = m; #1;
    `CHECK(rxv, exp_rx, "delivery")
    if (exp_rx) `CHECK(rxd, m.data, "delivered byte")
    @(posedge clk); #1; clear_in();
    for (int o = 0; o < 4; o++) begin
      `CHECK((out_bus[o].dest != 0), exp_out[o], "output set")
      if (exp_out[o]) begin
        `CHECK(out_bus[o].data, m.data, "forwarded data")
        `CHECK(out_bus[o].age, m.age + 4'd1, "age counts hops")
        `CHECK(out_bus[o].last_dir, dir_e'(o), "last taken direction")
      end
    end
    @(posedge clk); #1;
  endtask

  initial begin
    msg_t m;
    clear_in();
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    // own send
    @(negedge clk); txv = 1; txd = 8'd4; txdat = 8'hA5; #1;
    `CHECK(txr, 1'b1, "ready to send when idle")
    @(posedge clk); #1; txv = 0;
    for (int o = 0; o < 4; o++) begin
      `CHECK(out_bus[o].dest, 8'd4, "send dest")
      `CHECK(out_bus[o].data, 8'hA5, "send data")
      `CHECK(out_bus[o].orig, 8'd7, "send origin")
      `CHECK(out_bus[o].orig_dir, dir_e'(o), "origination direction")
    end
    `CHECK(txr, 1'b0, "not ready while buses busy")
    @(posedge clk); #1;
    `CHECK(out_bus[0].dest, 8'h00, "null after message")
    // wave rule
    pass(DIR_W, mk(9, 0), 0, 4'b0111);  // travelling east: E, N, S
    pass(DIR_E, mk(9, 2), 0, 4'b1101);  // travelling west: W, N, S
    pass(DIR_S, mk(9, 1), 0, 4'b0001);  // travelling north: N only
    pass(DIR_N, mk(9, 1), 0, 4'b0100);  // travelling south: S only
    pass(DIR_W, mk(7, 0), 1, 4'b0000);  // for me: absorbed
    pass(DIR_E, mk(255, 0), 1, 4'b1101);// broadcast: delivered and passed on
    pass(DIR_W, mk(9, 15), 0, 4'b0000); // too old: dropped
    // forwarding blocks the node's own send
    @(negedge clk); in_bus[DIR_W] = mk(9, 0); txv = 1; #1;
    `CHECK(txr, 1'b0, "forwarding has priority over own send")
    @(posedge clk); #1; clear_in(); txv = 0;
    repeat (2) @(posedge clk);
    // collision: two branches want the north bus
    @(negedge clk); in_bus[DIR_W] = mk(9, 0); in_bus[DIR_E] = mk(8, 0); #1;
    `CHECK(coll, 1'b1, "collision reported")
    @(posedge clk); #1; clear_in();
    repeat (2) @(posedge clk);
    // register-thru: the east bus has counted the east travellers seen so far
    for (int i = 0; i < TH + 2; i++) begin
      @(negedge clk); in_bus[DIR_W] = mk(9, 0); @(posedge clk); #1; clear_in(); @(posedge clk); #1;
    end
    `CHECK(thru[DIR_E], 1'b1, "east bus cut through")
    @(negedge clk); m = mk(9, 0); in_bus[DIR_W] = m; #1;
    `CHECK(out_bus[DIR_E], m, "same-cycle pass on the wire")
    @(posedge clk); #1; clear_in(); #1;
    `CHECK(out_bus[DIR_E].dest, 8'h00, "no registered copy when cut through")
    @(posedge clk);
    // a broadcast resets it
    @(negedge clk); in_bus[DIR_W] = mk(255, 0); @(posedge clk); #1; clear_in();
    @(posedge clk); #1;
    `CHECK(thru[DIR_E], 1'b0, "broadcast resets the cut")
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
