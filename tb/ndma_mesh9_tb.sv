// Register-thru workload on a 3 x 3 mesh (nine nodes): one node sends a long
// stream of messages to the node in the opposite corner and the testbench
// measures, for each message, the cycles from the clock edge where the sender's
// network layer takes it to the clock edge where the receiver sees it.
//
// Node 1 (row 0, column 0) runs a small program placed in its instruction
// memory: snip 500 to node 9 (row 2, column 2), 40 single-byte messages, four
// broadcasts, four more messages to node 9, break. The stream travels east
// along row 0 and turns south at column 2, so two buses carry it straight
// through a node: the east bus of node 2 and the south bus of node 6. While
// they are registered hops the latency is 4 cycles; once both counters have
// reached the threshold (8 passing messages) they are cut through and the
// latency drops to 2. The broadcasts reset the counters, so the last four
// messages take 4 cycles again. Checked: the latency of every message against
// this profile and that node 9 received every message once.
// A collision is staged as well: node 3 (row 0, column 2) sends one message to
// node 5 in the same cycle as node 1's first send. Node 1's copy arrives at
// node 2 travelling east and node 3's travelling west, both branch south there
// in the same cycle, the branch from the west wins and node 3's message is
// lost: exactly one collision, flagged by node 2, and node 5 never receives
// node 3's message. Node 3's copy sent south passes straight through node 6
// and counts on its south bus, so that bus cuts through one message before
// the east bus of node 2 does: the eighth message takes 3 cycles.
`include "tb/ndma_tb.svh"
module ndma_mesh9_tb;
  import ndma_pkg::*;
  localparam int R = 3, C = 3, N = R * C;
  localparam int A0 = 4, T0 = 8, T1 = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [N-1:0][7:0][31:0] inp = '0, outp;
  logic [N-1:0][7:0] ids;
  logic [N-1:0][9:0] pc;
  logic [N-1:0] halted, stall, njump, rxv, coll;
  logic [N-1:0][3:0] thru;
  logic [10:0] boot_words;
  logic hs, vs;
  logic [2:0] vr, vg;
  logic [1:0] vb;
  always #5 clk = ~clk;

  ndma_top #(.ROWS(R), .COLS(C), .CLK_DIV(1)) dut (.clk, .rst, .uart_rxd(1'b1), .boot_mode(1'b0),
    .resume('0), .in_ports(inp), .out_ports(outp), .node_id(ids), .pc, .halted, .stall,
    .net_jump(njump), .rx_valid(rxv), .collision(coll), .thru, .boot_words,
    .ps2_clk(1'b1), .ps2_data(1'b1), .vga_clk(clk), .vga_hsync(hs), .vga_vsync(vs),
    .vga_r(vr), .vga_g(vg), .vga_b(vb));

  // sender program
  logic [31:0] prog [$], prog3 [$];
  initial begin
    logic [31:0] snip;
    snip = enc_j(OP_SNIP, 500);
    prog.push_back(enc_j(OP_SID, 1));
    prog.push_back(enc_i(OP_ORI, A0, 0, 9));
    prog.push_back(enc_i(OP_LUI, T0, 0, snip[31:16]));
    prog.push_back(enc_i(OP_ORI, T0, T0, snip[15:0]));
    for (int k = 3; k >= 0; k--) prog.push_back(enc_i(OP_SMSGR, T0, A0, k));
    prog.push_back(enc_i(OP_ORI, T1, 0, 40));
    prog.push_back(enc_i(OP_SMSG, 0, A0, 0));          // loop
    prog.push_back(enc_i(OP_ADDI, T1, T1, -1));
    prog.push_back(enc_i(OP_BNE, 0, T1, -3));
    for (int k = 0; k < 4; k++) prog.push_back(enc_j(OP_BCST, 0));
    for (int k = 0; k < 4; k++) prog.push_back(enc_i(OP_SMSG, 0, A0, 0));
    prog.push_back(enc_r(FN_BREAK, 0, 0, 0, 0));
    // node 3: its send is the fifth instruction, like node 1's first send
    prog3.push_back(enc_j(OP_SID, 3));
    prog3.push_back(enc_i(OP_ORI, A0, 0, 5));
    prog3.push_back(32'd0);
    prog3.push_back(32'd0);
    prog3.push_back(enc_i(OP_SMSG, 0, A0, 8'h77));
    prog3.push_back(enc_r(FN_BREAK, 0, 0, 0, 0));
  end

  // latency measurement
  int sent_at [$];
  int lat [$];
  int cyc = 0, n_coll = 0, n_coll_node2 = 0, n_77_at_5 = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (dut.g_row[0].g_col[0].u_node.u_cpu.tx_valid && dut.g_row[0].g_col[0].u_node.u_cpu.tx_ready)
      sent_at.push_back(cyc);
    if (rxv[N - 1]) begin
      if (sent_at.size() == 0) begin
        failures++; $display("FAIL node 9 received a message nobody sent");
      end else lat.push_back(cyc - sent_at.pop_front());
    end
    n_coll += $countones(coll);
    if (coll[1]) n_coll_node2++;
    if (rxv[4] && dut.g_row[1].g_col[1].u_node.u_net.rx_data == 8'h77) n_77_at_5++;
  end

  initial begin
    int n2, n4;
    #1;
    foreach (prog[i]) dut.g_row[0].g_col[0].u_node.u_imem.mem[i] = prog[i];
    foreach (prog3[i]) dut.g_row[0].g_col[2].u_node.u_imem.mem[i] = prog3[i];
    repeat (3) @(posedge clk); rst <= 0;
    n2 = 0;
    while (!halted[0] && n2 < 5000) begin @(posedge clk); n2++; end
    repeat (20) @(posedge clk); #1;
    `CHECK(halted[0], 1'b1, "sender finished")
    `CHECK(ids[N - 1], 8'd9, "receiver ID")
    `CHECK(lat.size(), 52, "every message received once")
    `CHECK(n_coll, 1, "one collision in the whole mesh")
    `CHECK(n_coll_node2, 1, "collision flagged by node 2")
    `CHECK(n_77_at_5, 0, "node 3's message lost")
    `CHECK(halted[2], 1'b1, "node 3 finished")
    n2 = 0; n4 = 0;
    foreach (lat[i]) begin
      if (lat[i] == 2) n2++;
      if (lat[i] == 4) n4++;
      if (i < 7) `CHECK(lat[i], 4, "registered hops before adapting")
      if (i == 7) `CHECK(lat[i], 3, "south bus of node 6 cut through first")
      if (i >= 12 && i < 44) `CHECK(lat[i], 2, "cut-through after adapting")
      if (i >= 48) `CHECK(lat[i], 4, "registered again after the broadcast")
    end
    $display("INFO latencies: %0d messages at 4 cycles, %0d at 2 cycles, %0d in between",
             n4, n2, lat.size() - n4 - n2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); `TB_DONE end
endmodule
