// Testbench for ndma_net_ctrl: drives SID, BCST, SMSG, BCSTR and SMSGR with
// random operands and checks destination, data byte, send flag, stall while the
// network is not ready, and the once-only ID rule.
`include "tb/ndma_tb.svh"
module ndma_net_ctrl_tb;
  import ndma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, tx_ready = 1;
  logic [31:0] instr = 0, rsd = 0, rtd = 0;
  logic [7:0] my_id, dest, data;
  logic txv, stall;
  always #5 clk = ~clk;
  ndma_net_ctrl dut (.clk, .rst, .en, .instr, .rs_data(rsd), .rt_data(rtd), .my_id,
                     .tx_valid(txv), .tx_dest(dest), .tx_data(data), .tx_ready, .stall);
  task automatic sid(int v);
    @(negedge clk); en = 1; instr = enc_j(OP_SID, v); @(posedge clk); #1; en = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(my_id, 8'h00, "id after reset")
    sid(255); `CHECK(my_id, 8'h00, "0xFF is reserved")
    sid(9);   `CHECK(my_id, 8'h09, "sid 9")
    sid(12);  `CHECK(my_id, 8'h09, "id cannot change once set")
    for (int n = 0; n < 400; n++) begin
      int k, sel; logic [7:0] ed, ev;
      @(negedge clk);
      sel = $urandom_range(0, 4); k = $urandom_range(0, 3);
      rsd = $urandom; rtd = $urandom; en = ($urandom_range(0, 3) != 0);
      tx_ready = ($urandom_range(0, 1) == 1);
      case (sel)
        0: begin instr = enc_j(OP_BCST, $urandom_range(0, 255));      ed = 8'hFF;     ev = instr[7:0]; end
        1: begin instr = enc_i(OP_SMSG, 0, 7, $urandom_range(0, 255)); ed = rsd[7:0]; ev = instr[7:0]; end
        2: begin instr = enc_i(OP_BCSTR, 7, 7, k);  ed = 8'hFF;     ev = 8'(rsd >> (8*k)); end
        3: begin instr = enc_i(OP_SMSGR, 8, 7, k);  ed = rsd[7:0]; ev = 8'(rtd >> (8*k)); end
        default: begin instr = enc_i(OP_ADDI, 1, 2, 3); ed = 0; ev = 0; end
      endcase
      #1;
      `CHECK(txv, (en && sel < 4), "send flag")
      `CHECK(stall, (en && sel < 4 && !tx_ready), "stall")
      if (sel < 4) begin
        `CHECK(dest, ed, "destination")
        `CHECK(data, ev, "data byte")
      end
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
