// Testbench for ndma_cpu: runs a hand-assembled program from a memory model and
// checks its results in data memory, the output ports, the messages it sends
// (with the network randomly not ready, so the core must stall), the cycle
// count of the single-cycle core up to a BREAK, and then the network-driven
// side: bytes delivered as if from the network dispatch SNIP, three
// instructions and BREAK into instruction memory, JALNET jumps there saving the
// interrupted PC, and NDJR jumps to a register.
`include "tb/ndma_tb.svh"
module ndma_cpu_tb;
  import ndma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, resume = 0;
  logic [9:0] pc, iwa, dadr;
  logic [31:0] instr, iwd, drd, dwd;
  logic iwe, dwe;
  logic [7:0][31:0] inp, outp;
  logic [7:0] my_id, txd, txdat, rxd = 0;
  logic txv, txr = 1, rxv = 0, halted, stall, njump;
  logic [31:0] prog [1024];
  logic [31:0] dm [1024];
  int cyc = 0, stalls = 0;
  logic [15:0] sent [$];
  always #5 clk = ~clk;

  ndma_cpu #(.IAW(10), .DAW(10), .NPORTS(8)) dut (
    .clk, .rst, .resume, .pc, .instr, .imem_we(iwe), .imem_waddr(iwa), .imem_wdata(iwd),
    .dmem_addr(dadr), .dmem_rdata(drd), .dmem_we(dwe), .dmem_wdata(dwd),
    .in_ports(inp), .out_ports(outp), .my_id, .tx_valid(txv), .tx_dest(txd), .tx_data(txdat),
    .tx_ready(txr), .rx_valid(rxv), .rx_data(rxd), .halted, .stall, .net_jump(njump));

  assign instr = prog[pc];
  assign drd   = dm[dadr];
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      if (iwe) prog[iwa] <= iwd;
      if (dwe) dm[dadr] <= dwd;
      if (txv && txr) sent.push_back({txd, txdat});
      if (stall) stalls++;
    end
  end

  task automatic net_word(logic [31:0] w);
    for (int b = 3; b >= 0; b--) begin
      @(negedge clk); rxv = 1; rxd = w[8*b +: 8]; @(negedge clk); rxv = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int t0;
    for (int i = 0; i < 1024; i++) begin prog[i] = 0; dm[i] = 0; end
    for (int i = 0; i < 8; i++) inp[i] = 32'h100 * i + 32'h11;
    prog[0]  = enc_i(OP_ORI, 1, 0, 5);
    prog[1]  = enc_i(OP_ORI, 2, 0, 0);
    prog[2]  = enc_r(FN_ADD, 2, 2, 1, 0);
    prog[3]  = enc_i(OP_ADDI, 1, 1, -1);
    prog[4]  = enc_i(OP_BNE, 0, 1, -3);
    prog[5]  = enc_i(OP_SW, 2, 0, 10);
    prog[6]  = enc_i(OP_LW, 3, 0, 10);
    prog[7]  = enc_i(OP_ADDI, 3, 3, 1);
    prog[8]  = enc_i(OP_SW, 3, 0, 11);
    prog[9]  = enc_j(OP_JAL, 40);
    prog[10] = enc_i(OP_SW, 31, 0, 12);
    prog[11] = enc_i(OP_OUT, 3, 5, 0);
    prog[12] = enc_i(OP_IN, 4, 2, 0);
    prog[13] = enc_i(OP_SW, 4, 0, 13);
    prog[14] = enc_i(OP_OUTI, 0, 6, 16'h1234);
    prog[15] = enc_i(OP_LUI, 5, 0, 16'hABCD);
    prog[16] = enc_i(OP_ORI, 5, 5, 16'h1234);
    prog[17] = enc_r(FN_SRA, 7, 0, 5, 4);
    prog[18] = enc_i(OP_SW, 7, 0, 14);
    prog[19] = enc_r(FN_SLT, 8, 7, 0, 0);
    prog[20] = enc_i(OP_SW, 8, 0, 16);
    prog[21] = enc_i(OP_SB, 5, 0, 17);
    prog[22] = enc_i(OP_LH, 9, 0, 14);
    prog[23] = enc_i(OP_SW, 9, 0, 18);
    prog[24] = enc_r(FN_BREAK, 0, 0, 0, 0);
    prog[25] = enc_i(OP_ORI, 10, 0, 4);
    prog[26] = enc_j(OP_SID, 3);
    prog[27] = enc_i(OP_BCSTR, 5, 5, 3);
    prog[28] = enc_i(OP_BCSTR, 5, 5, 2);
    prog[29] = enc_i(OP_SMSGR, 5, 10, 1);
    prog[30] = enc_i(OP_SMSG, 0, 10, 8'h5A);
    prog[31] = enc_j(OP_BCST, 8'h77);
    prog[32] = enc_i(OP_REGIMM, 0, 7, 1);   // bltz r7 -> 34
    prog[33] = enc_i(OP_ORI, 11, 0, 1);
    prog[34] = enc_i(OP_BLEZ, 0, 0, 1);     // -> 36
    prog[35] = enc_i(OP_ORI, 11, 0, 2);
    prog[36] = enc_i(OP_BGTZ, 0, 10, 1);    // -> 38
    prog[37] = enc_i(OP_ORI, 11, 0, 3);
    prog[38] = enc_i(OP_SW, 11, 0, 19);
    prog[39] = enc_r(FN_BREAK, 0, 0, 0, 0);
    prog[40] = enc_i(OP_ADDI, 8, 0, 77);
    prog[41] = enc_r(FN_JR, 0, 31, 0, 0);
    prog[110] = enc_i(OP_SW, 13, 0, 22);
    prog[111] = enc_r(FN_BREAK, 0, 0, 0, 0);

    repeat (2) @(posedge clk); rst <= 0;
    // part 1: plain program, one instruction per cycle
    wait (halted); #1;
    `CHECK(cyc, 39, "cycles to first break (39 instructions)")
    `CHECK(dm[10], 32'd15, "loop sum")
    `CHECK(dm[11], 32'd16, "load then use")
    `CHECK(dm[12], 32'd10, "jal links PC+1")
    `CHECK(outp[5], 32'd16, "out")
    `CHECK(dm[13], inp[2], "in")
    `CHECK(outp[6], 32'h1234, "outi")
    `CHECK(dm[14], 32'hFABC_D123, "lui/ori/sra")
    `CHECK(dm[16], 32'd1, "slt")
    `CHECK(dm[17], 32'h34, "sb stores the low byte")
    `CHECK(dm[18], 32'hFFFF_D123, "lh sign-extends")
    repeat (5) @(posedge clk); #1;
    `CHECK(pc, 10'd25, "halted holds PC after break")
    // part 2: sends under back-pressure, branches
    @(negedge clk); resume = 1; @(negedge clk); resume = 0;
    while (!halted) begin @(negedge clk); txr = ($urandom_range(0, 2) == 0); end
    txr = 1; #1;
    `CHECK(my_id, 8'd3, "sid")
    `CHECK(sent.size(), 5, "five messages sent")
    if (sent.size() == 5) begin
      `CHECK(sent[0], 16'hFFAB, "bcstr byte 3")
      `CHECK(sent[1], 16'hFFCD, "bcstr byte 2")
      `CHECK(sent[2], 16'h0412, "smsgr byte 1 to id 4")
      `CHECK(sent[3], 16'h045A, "smsg")
      `CHECK(sent[4], 16'hFF77, "bcst")
    end
    `CHECK((stalls > 0), 1'b1, "core stalled on a busy network")
    `CHECK(dm[19], 32'd0, "branches taken")
    // part 3: network-driven operation
    net_word(enc_j(OP_SNIP, 100));
    net_word(enc_i(OP_ORI, 12, 0, 99));
    net_word(enc_i(OP_SW, 12, 0, 20));
    net_word(enc_i(OP_SW, 31, 0, 21));
    net_word(enc_i(OP_ORI, 13, 0, 110));
    net_word(enc_r(FN_BREAK, 0, 0, 0, 0));
    `CHECK(prog[100], enc_i(OP_ORI, 12, 0, 99), "dispatched word at pointer")
    `CHECK(prog[104], enc_r(FN_BREAK, 0, 0, 0, 0), "dispatched words in order")
    `CHECK(halted, 1'b1, "still halted before jalnet")
    t0 = cyc;
    net_word(enc_j(OP_JALNET, 0));
    wait (halted); #1;
    `CHECK(dm[20], 32'd99, "dispatched code ran")
    `CHECK(dm[21], 32'd40, "jalnet saved the interrupted PC")
    net_word({6'h3A, 5'd13, 21'd0});   // ndjr r13
    wait (halted); #1;
    `CHECK(dm[22], 32'd110, "ndjr jumped to register")
    `TB_DONE
  end
  initial begin #200000; failures++; $display("watchdog"); `TB_DONE end
endmodule
