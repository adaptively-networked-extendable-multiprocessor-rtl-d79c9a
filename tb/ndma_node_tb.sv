// Testbench for ndma_node: one node, its buses driven by the testbench acting
// as its neighbours. Checks that the node takes its ID from its start-up image,
// that code dispatched to it as network messages is stored and run after a
// JALNET, that the code's own message goes out on all four buses with the
// node as origin, and that a message for another node passing from west to
// east is forwarded straight and branched north and south.
`include "tb/ndma_tb.svh"
module ndma_node_tb;
  import ndma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  msg_t in_bus [4], out_bus [4];
  logic [7:0][31:0] inp = '0, outp;
  logic [7:0] my_id, seen_dest, seen_data;
  logic [9:0] pc;
  logic halted, stall, njump, rxv, coll;
  logic [3:0] thru;
  int sends = 0;
  always #5 clk = ~clk;
  ndma_node #(.BOOT_ID(8'd5)) dut (.clk, .rst, .resume(1'b0), .in_bus, .out_bus,
    .in_ports(inp), .out_ports(outp), .boot_we(1'b0), .boot_addr('0), .boot_data('0),
    .my_id, .pc, .halted, .stall, .net_jump(njump), .rx_valid(rxv), .collision(coll), .thru);

  always @(posedge clk) if (!rst && out_bus[DIR_W].dest == 8'd9 && out_bus[DIR_W].orig == 8'd5) begin
    sends++; seen_dest = out_bus[DIR_W].dest; seen_data = out_bus[DIR_W].data;
    `CHECK(out_bus[DIR_N], out_bus[DIR_E] ^ 32'h5, "same message on every bus but the direction bits")
  end

  function automatic msg_t mk(int dst, int b);
    msg_t m; m = '0; m.dest = 8'(dst); m.data = 8'(b); m.orig = 8'd2;
    m.orig_dir = DIR_E; m.last_dir = DIR_E; return m;
  endfunction
  task automatic send_word(logic [31:0] w);
    for (int b = 3; b >= 0; b--) begin
      @(negedge clk); in_bus[DIR_W] = mk(5, w[8*b +: 8]);
      @(negedge clk); in_bus[DIR_W] = '0;
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) in_bus[s] = '0;
    repeat (2) @(posedge clk); rst <= 0;
    repeat (4) @(posedge clk); #1;
    `CHECK(my_id, 8'd5, "ID from the start-up image")
    `CHECK((pc >= 1 && pc <= 3), 1'b1, "parked in the ID loop")
    send_word(enc_j(OP_SNIP, 200));
    send_word(enc_i(OP_ORI, 2, 0, 9));
    send_word(enc_i(OP_SMSG, 0, 2, 8'h42));
    send_word(enc_r(FN_BREAK, 0, 0, 0, 0));
    `CHECK(dut.u_imem.mem[201], enc_i(OP_SMSG, 0, 2, 8'h42), "dispatched code stored")
    `CHECK(halted, 1'b0, "node not yet running the code")
    send_word(enc_j(OP_JALNET, 0));
    repeat (10) @(posedge clk); #1;
    `CHECK(halted, 1'b1, "dispatched code reached break")
    `CHECK(sends, 1, "one message sent by dispatched code")
    `CHECK(seen_data, 8'h42, "message data")
    // pass-through of a message for node 9 arriving from the west
    @(negedge clk); in_bus[DIR_W] = mk(9, 8'h33);
    @(negedge clk); in_bus[DIR_W] = '0; #1;
    `CHECK(out_bus[DIR_E].dest, 8'd9, "forwarded east")
    `CHECK(out_bus[DIR_N].data, 8'h33, "branched north")
    `CHECK(out_bus[DIR_S].data, 8'h33, "branched south")
    `CHECK(out_bus[DIR_W].dest, 8'd0, "not sent back west")
    `CHECK(out_bus[DIR_E].age, 4'd1, "age counted")
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
