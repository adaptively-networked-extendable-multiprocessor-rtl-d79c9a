// Testbench for ndma_reg_thru: checks the one-cycle register path, the null
// message between two messages, counting up to the threshold and the switch to
// the wire path, the wake-up after messages for this node, and the reset of
// the counter by a broadcast.
`include "tb/ndma_tb.svh"
module ndma_reg_thru_tb;
  import ndma_pkg::*;
  localparam int TH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic load = 0, ep = 0, er = 0, eb = 0, ready, thru, lost;
  msg_t d = '0, w = '0, out;
  logic [2:0] count;
  always #5 clk = ~clk;
  ndma_reg_thru #(.THRESH(TH)) dut (.clk, .rst, .load, .d, .wire_in(w), .ev_pass(ep),
    .ev_recv(er), .ev_bcast(eb), .ready, .thru, .lost, .out, .count);
  function automatic msg_t mk(int dst);
    msg_t m; m = '0; m.dest = 8'(dst); m.data = 8'($urandom); m.orig = 8'd3; return m;
  endfunction
  task automatic ev(logic p, logic r, logic b);
    @(negedge clk); ep = p; er = r; eb = b; @(posedge clk); #1; ep = 0; er = 0; eb = 0;
  endtask
  initial begin
    int c;
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(ready, 1'b1, "idle ready")
    `CHECK(out.dest, 8'h00, "idle bus")
    // register path
    @(negedge clk); load = 1; d = mk(5); @(posedge clk); #1; load = 0;
    `CHECK(out, d, "registered message after one cycle")
    `CHECK(ready, 1'b0, "busy while holding")
    @(negedge clk); load = 1; d = mk(6); @(posedge clk); #1; load = 0;
    `CHECK(out, d, "back-to-back forwarded messages")
    @(posedge clk); #1;
    `CHECK(out.dest, 8'h00, "register empties")
    // count up to the threshold
    c = 0;
    for (int i = 0; i < TH + 3; i++) begin
      int prev;
      prev = c;
      ev(1, 0, 0); if (c < TH) c++;
      `CHECK(int'(count), c, "count up, saturating")
      `CHECK(thru, (prev == TH), "cut through one cycle after reaching threshold")
    end
    // wire path: same-cycle pass
    @(negedge clk); w = mk(9); #1;
    `CHECK(out, w, "wire path in thru mode")
    w = '0; #1;
    // wake-up
    ev(0, 1, 0); c--;
    `CHECK(int'(count), c, "message for me counts down")
    @(posedge clk); #1;
    `CHECK(thru, 1'b0, "node awakens")
    @(negedge clk); w = mk(9); #1;
    `CHECK(out.dest, 8'h00, "wire not used when awake")
    w = '0;
    ev(1, 0, 0); c++;
    @(posedge clk); #1;
    `CHECK(thru, 1'b1, "cut again")
    // the switch waits for an idle input
    ev(0, 1, 0); @(posedge clk); #1;
    @(negedge clk); w = mk(9); ep = 1; @(posedge clk); #1; ep = 0;
    `CHECK(thru, 1'b0, "no switch while the input is busy")
    w = '0; @(posedge clk); #1;
    `CHECK(thru, 1'b1, "switch once the input is idle")
    // own message in the register while the wire carries a message: wire wins
    @(negedge clk); load = 1; d = mk(5); @(posedge clk); #1; load = 0;
    `CHECK(out, d, "register drives an idle cut bus")
    `CHECK(lost, 1'b0, "nothing lost while the wire is idle")
    w = mk(9); #1;
    `CHECK(out, w, "wire wins over the register")
    `CHECK(lost, 1'b1, "register message lost")
    w = '0; @(posedge clk); #1;
    ev(1, 0, 1); c = 0;
    `CHECK(int'(count), 0, "broadcast clears counter")
    @(posedge clk); #1;
    `CHECK(thru, 1'b0, "broadcast ends cut-through")
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
