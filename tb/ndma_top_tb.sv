// End-to-end testbench for ndma_top at its default size (2 x 3 mesh, 1024-word
// memories, 27 MHz board clock divided by 9 into the 3 MHz core clock, 115200
// baud). All cycle counts and waits below are in core clock cycles.
//
// The master-CPU convention of the architecture, run on the six-node system:
//  1. a program image for the master (node ID 1) is sent over the RS232 line
//     and loaded by the bootloader;
//  2. the master dispatches to node 4, two hops east and one south, a counting
//     loop (count to 170), then code that will send three instructions back
//     (snip 511, j complete, jalnet), then break, then jalnet to start it;
//  3. the master waits in a loop; node 4 counts, sends its completion code
//     back, and its jalnet pulls the master out of the wait loop;
//  4. the master then sends ndjr $ra to node 4 (back to its ID loop),
//     broadcasts a no-op word to every node, plots a pixel through the
//     graphics unit (set X, set Y, plot, each with the valid/complete
//     handshake), reads a key from the keyboard buffer (a key press played on
//     the PS/2 lines during the run), writes the character to output port 3
//     and 0xFF to output port 7, and stops at a break.
// Checked: the result values, that node 4 starts sending exactly 344 cycles
// after its jalnet (3 set-up instructions and 170 two-instruction loop passes,
// one instruction per cycle), and that each mechanism occurred: bootloading,
// send stalls, network-driven jumps, message forwarding through intermediate
// nodes, register-thru cut-through, the broadcast clearing it, NDJR, graphics
// commands and a keyboard read. Also checked: the core clock period is 9 board
// clock periods. The pixel is then checked on the VGA output.
`include "tb/ndma_tb.svh"
module ndma_top_tb;
  import ndma_pkg::*;
  localparam int N = 6, CPB = 27_000_000 / 9 / 115_200;   // core clocks per bit
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rxd = 1, boot_mode = 0;
  logic [N-1:0] resume = '0;
  logic [N-1:0][7:0][31:0] inp = '0, outp;
  logic [N-1:0][7:0] ids;
  logic [N-1:0][9:0] pc;
  logic [N-1:0] halted, stall, njump, rxv, coll;
  logic [N-1:0][3:0] thru;
  logic [10:0] boot_words;
  logic kclk = 1, kdat = 1, vclk = 0, hs, vs;
  logic [2:0] vr, vg;
  logic [1:0] vb;
  always #5 clk = ~clk;
  wire cclk = dut.cclk;      // core clock: clk divided by 9
  always #4 vclk = ~vclk;   // fast pixel clock keeps a frame short

  ndma_top dut (.clk, .rst, .uart_rxd(rxd), .boot_mode, .resume, .in_ports(inp),
    .out_ports(outp), .node_id(ids), .pc, .halted, .stall, .net_jump(njump),
    .rx_valid(rxv), .collision(coll), .thru, .boot_words,
    .ps2_clk(kclk), .ps2_data(kdat), .vga_clk(vclk), .vga_hsync(hs), .vga_vsync(vs),
    .vga_r(vr), .vga_g(vg), .vga_b(vb));

  localparam int PX = 100, PY = 200, PCOLOR = 8'hE5;

  // ---------------- program image (assembled here) ----------------
  logic [31:0] img [$];
  function automatic void emit(logic [31:0] w); img.push_back(w); endfunction
  // set register r to the 32-bit word of an instruction: ori r,0,0; lui; ori
  function automatic void sri(int r, logic [31:0] w);
    emit(enc_i(OP_ORI, r, 0, 0));
    emit(enc_i(OP_LUI, r, 0, w[31:16]));
    emit(enc_i(OP_ORI, r, r, w[15:0]));
  endfunction
  localparam int V0 = 2, A0 = 4, A1 = 5, A2 = 6, T0 = 8, T1 = 9, T2 = 10, RA = 31;
  int complete_at;
  // one graphics command: out $5 = valid | cmd; wait for complete; out $5 = 0
  function automatic void gpu_cmd(logic [15:0] c);
    emit(enc_i(OP_LUI, T2, 0, 1));
    emit(enc_i(OP_ORI, T1, T2, c));
    emit(enc_i(OP_OUT, T1, 5, 0));
    emit(enc_i(OP_IN, T2, 1, 0));
    emit(enc_i(OP_BEQ, 0, T2, -2));
    emit(enc_i(OP_OUT, 0, 5, 0));
  endfunction
  localparam int SMSG_R = 1, SMSG_RR = 6;

  function automatic void build(int complete);
    img.delete();
    emit(0);                                         // 0: j main (patched)
    // SMSG_R: send the word in $a1 to the node whose ID is in $a0
    for (int k = 3; k >= 0; k--) emit(enc_i(OP_SMSGR, A1, A0, k));
    emit(enc_r(FN_JR, 0, RA, 0, 0));
    // SMSG_RR: make node $a0 send the word in $a2 to node $a1
    sri(T0, enc_i(OP_SMSG, 0, A1, 0));
    for (int b = 3; b >= 0; b--) begin
      for (int k = 3; k >= 1; k--) emit(enc_i(OP_SMSGR, T0, A0, k));
      emit(enc_i(OP_SMSGR, A2, A0, b));
    end
    emit(enc_r(FN_JR, 0, RA, 0, 0));
    img[0] = enc_j(OP_J, img.size());
    // main
    emit(enc_j(OP_SID, 1));
    emit(0);
    emit(enc_i(OP_ORI, A0, 0, 4));
    sri(A1, enc_j(OP_SNIP, 42));           emit(enc_j(OP_JAL, SMSG_R));
    sri(A1, enc_i(OP_ORI, A1, 0, 1));      emit(enc_j(OP_JAL, SMSG_R));
    sri(A1, enc_i(OP_ORI, T0, 0, 0));      emit(enc_j(OP_JAL, SMSG_R));
    sri(A1, enc_i(OP_ORI, T1, 0, 170));    emit(enc_j(OP_JAL, SMSG_R));
    sri(A1, enc_i(OP_ADDI, T0, T0, 1));    emit(enc_j(OP_JAL, SMSG_R));
    sri(A1, enc_i(OP_BNE, T1, T0, -2));    emit(enc_j(OP_JAL, SMSG_R));
    emit(enc_i(OP_ORI, A1, 0, 1));
    sri(A2, enc_j(OP_SNIP, 511));          emit(enc_j(OP_JAL, SMSG_RR));
    sri(A2, enc_j(OP_J, complete));        emit(enc_j(OP_JAL, SMSG_RR));
    sri(A2, enc_j(OP_JALNET, 0));          emit(enc_j(OP_JAL, SMSG_RR));
    sri(A1, enc_r(FN_BREAK, 0, 0, 0, 0));  emit(enc_j(OP_JAL, SMSG_R));
    sri(A1, enc_j(OP_JALNET, 0));          emit(enc_j(OP_JAL, SMSG_R));
    // wait: nop; j wait
    emit(0);
    emit(enc_j(OP_J, img.size() - 1));
    // complete:
    complete_at = img.size();
    sri(A1, {OP_NDJR, 5'(RA), 21'd0});     emit(enc_j(OP_JAL, SMSG_R));
    for (int k = 0; k < 4; k++) emit(enc_j(OP_BCST, 0));
    // plot a pixel
    gpu_cmd(16'h0000 + 16'(PX));
    gpu_cmd(16'h0400 + 16'(PY));
    gpu_cmd(16'h1C00 + 16'(PCOLOR));
    // read a key: wait for a character, request, wait for complete, release
    emit(enc_i(OP_IN, T1, 2, 0));
    emit(enc_r(FN_SRL, T1, 0, T1, 9));
    emit(enc_i(OP_BNE, 0, T1, -3));
    emit(enc_i(OP_OUTI, 0, 6, 1));
    emit(enc_i(OP_IN, T1, 2, 0));
    emit(enc_r(FN_SRL, T1, 0, T1, 8));
    emit(enc_i(OP_ANDI, T1, T1, 1));
    emit(enc_i(OP_BEQ, 0, T1, -4));
    emit(enc_i(OP_IN, V0, 2, 0));
    emit(enc_i(OP_ANDI, V0, V0, 16'hFF));
    emit(enc_i(OP_OUT, 0, 6, 0));
    emit(enc_i(OP_OUT, V0, 3, 0));
    emit(enc_i(OP_ORI, T2, 0, 16'hFF));
    emit(enc_i(OP_OUT, T2, 7, 0));
    emit(enc_r(FN_BREAK, 0, 0, 0, 0));
  endfunction

  // one PS/2 frame: start, 8 data bits LSB first, odd parity, stop
  task automatic key_byte(logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kdat = f[i]; repeat (10) @(posedge cclk);
      kclk = 0;    repeat (10) @(posedge cclk);
      kclk = 1;
    end
    repeat (30) @(posedge cclk);
  endtask

  task automatic uart_byte(logic [7:0] b);
    rxd = 0; repeat (CPB) @(posedge cclk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge cclk); end
    rxd = 1; repeat (2 * CPB) @(posedge cclk);
  endtask

  // ---------------- event counters ----------------
  int c_stall = 0, c_njump = 0, c_fwd = 0, c_thru_on = 0, c_bcast_clear = 0;
  int c_jalnet4 = -1, c_first_tx4 = -1, cyc = 0, c_coll = 0, c_gpu = 0, c_key = 0;
  logic gpu_done_q = 0, key_done_q = 0;
  logic [N-1:0][3:0] thru_q = '0;
  always @(posedge cclk) if (!rst) begin
    cyc++;
    c_stall += $countones(stall);
    c_njump += $countones(njump);
    c_coll  += $countones(coll);
    for (int i = 0; i < N; i++) begin
      c_thru_on     += $countones(thru[i] & ~thru_q[i]);
      c_bcast_clear += $countones(~thru[i] & thru_q[i]);
    end
    thru_q <= thru;
    gpu_done_q <= dut.gpu_done[0];
    key_done_q <= dut.kbd_status[8];
    if (dut.gpu_done[0] && !gpu_done_q) c_gpu++;
    if (dut.kbd_status[8] && !key_done_q) c_key++;
    if (coll != 0) $display("INFO collision nodes=%b cycle=%0d", coll, cyc);
    // node 2 (index 1) passing the master's traffic east
    if (dut.g_row[0].g_col[1].u_node.u_net.ev_pass[DIR_E]) c_fwd++;
    // node 4 is at index 5
    if (njump[5] && c_jalnet4 < 0 && dut.g_row[1].g_col[2].u_node.u_cpu.net_link) c_jalnet4 = cyc;
    if (c_jalnet4 >= 0 && c_first_tx4 < 0 && dut.g_row[1].g_col[2].u_node.u_cpu.tx_valid)
      c_first_tx4 = cyc;
  end

  initial begin
    int complete, n;
    // two passes: the first finds the address of "complete"
    build(0);
    complete = complete_at;
    build(complete);
    `CHECK(img[complete], enc_i(OP_ORI, A1, 0, 0), "complete label placement")
    repeat (3) @(posedge cclk); rst <= 0;
    repeat (5) @(posedge cclk); #1;
    begin
      realtime t0;
      @(posedge cclk); t0 = $realtime;
      @(posedge cclk);
      `CHECK(int'(($realtime - t0) / 10.0), 9, "core clock period in board clocks")
    end
    `CHECK(ids, {8'd4, 8'd3, 8'd6, 8'd5, 8'd2, 8'd1}, "node IDs from start-up images")
    // 1. bootload the master
    boot_mode = 1;
    foreach (img[i]) for (int b = 3; b >= 0; b--) uart_byte(img[i][8*b +: 8]);
    repeat (10) @(posedge cclk);
    `CHECK(int'(boot_words), img.size(), "words bootloaded")
    `CHECK(dut.g_row[0].g_col[0].u_node.u_imem.mem[complete], img[complete], "image in master memory")
    boot_mode = 0;
    // press and release 'a' on the keyboard while the system runs
    fork begin
      repeat (1000) @(posedge cclk);
      key_byte(8'h1C); key_byte(8'hF0); key_byte(8'h1C);
    end join_none
    // 2.-4. run until the master halts at its final break
    n = 0;
    while (!(halted[0] && outp[0][7] == 32'hFF) && n < 200000) begin @(posedge cclk); n++; end
    #1;
    `CHECK(outp[0][7], 32'hFF, "master reached complete")
    `CHECK(outp[0][3], 32'("a"), "master read the key from the keyboard buffer")
    `CHECK(dut.u_gpu.fb[PY * 640 + PX], 8'(PCOLOR), "pixel in the frame buffer")
    `CHECK(halted[0], 1'b1, "master stopped at break")
    `CHECK(dut.g_row[1].g_col[2].u_node.u_cpu.u_rf.regs[T0], 32'd170, "node 4 counted to 170")
    `CHECK(c_first_tx4 - c_jalnet4, 344, "node 4 loop cycles (single-cycle core)")
    `CHECK(dut.g_row[0].g_col[0].u_node.u_imem.mem[511], enc_j(OP_J, complete), "code sent back to master")
    repeat (50) @(posedge cclk); #1;
    `CHECK(halted[5], 1'b0, "ndjr released node 4 from its break")
    `CHECK((pc[5] >= 1 && pc[5] <= 3), 1'b1, "node 4 back in its ID loop")
    `CHECK(thru, '0, "broadcast cleared every cut-through")
    $display("INFO stalls=%0d net_jumps=%0d forwarded=%0d cut_throughs=%0d cleared=%0d collisions=%0d cycles=%0d",
             c_stall, c_njump, c_fwd, c_thru_on, c_bcast_clear, c_coll, cyc);
    `CHECK((c_stall > 0), 1'b1, "send stall happened")
    `CHECK(c_njump, 3, "network-driven jumps: jalnet to node 4, jalnet to master, ndjr to node 4")
    `CHECK((c_fwd > 0), 1'b1, "forwarding through an intermediate node happened")
    `CHECK((c_thru_on > 0), 1'b1, "register-thru cut-through happened")
    `CHECK((c_bcast_clear > 0), 1'b1, "broadcast cleared a cut-through")
    $display("INFO gpu_commands=%0d key_reads=%0d", c_gpu, c_key);
    `CHECK(c_gpu, 3, "graphics commands completed")
    `CHECK(c_key, 1, "keyboard reads")
    // the pixel on the VGA output
    n = 0;
    while (!(dut.u_gpu.hc == 10'(PX) && dut.u_gpu.vc == 10'(PY)) && n < 500_000) begin
      @(posedge vclk); #1; n++;
    end
    @(posedge vclk); #1;
    `CHECK({vr, vg, vb}, 8'(PCOLOR), "pixel shown on the VGA output")
    `TB_DONE
  end
  initial begin
    repeat (3_000_000) @(posedge cclk);
    failures++; $display("watchdog"); `TB_DONE
  end
endmodule
