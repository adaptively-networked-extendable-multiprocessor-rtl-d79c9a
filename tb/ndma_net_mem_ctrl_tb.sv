// Testbench for ndma_net_mem_ctrl: a reference model of pointer and write
// position follows random streams of SNIP, JALNET, NDJR and plain instructions;
// memory writes, jump requests and targets are checked every cycle.
`include "tb/ndma_tb.svh"
module ndma_net_mem_ctrl_tb;
  import ndma_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, iv = 0;
  logic [31:0] instr = 0;
  logic we, jump, link;
  logic [9:0] waddr, target, ptr, wptr, rptr, rwptr;
  logic [31:0] wdata;
  logic [4:0] nrs;
  always #5 clk = ~clk;
  ndma_net_mem_ctrl #(.AW(10)) dut (.clk, .rst, .instr_valid(iv), .instr,
    .imem_we(we), .imem_waddr(waddr), .imem_wdata(wdata), .net_jump(jump), .net_link(link),
    .net_target(target), .net_rs(nrs), .ptr, .wptr);
  initial begin
    rptr = 0; rwptr = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 600; n++) begin
      int sel;
      @(negedge clk);
      sel = $urandom_range(0, 9); iv = ($urandom_range(0, 3) != 0);
      case (sel)
        0: instr = enc_j(OP_SNIP, $urandom_range(0, 1023));
        1: instr = enc_j(OP_JALNET, 0);
        2: instr = enc_r(FN_JR, 0, $urandom_range(0, 31), 0, 0) | {6'h3A, 26'h0};
        default: instr = enc_i(OP_ADDI, $urandom_range(0, 31), $urandom_range(0, 31), $urandom);
      endcase
      #1;
      `CHECK(we, (iv && sel > 2), "writes plain instructions only")
      `CHECK(jump, (iv && (sel == 1 || sel == 2)), "jump request")
      `CHECK(link, (iv && sel == 1), "jalnet link")
      `CHECK(target, rptr, "jalnet target is the pointer")
      if (iv && sel == 2) `CHECK(nrs, instr[25:21], "ndjr register")
      if (iv && sel > 2) begin
        `CHECK(waddr, rwptr, "write address")
        `CHECK(wdata, instr, "write data")
      end
      @(posedge clk);
      if (iv && sel == 0) begin rptr = instr[9:0]; rwptr = instr[9:0]; end
      else if (iv && sel > 2) rwptr = rwptr + 1;
      #1;
      `CHECK(ptr, rptr, "pointer")
      `CHECK(wptr, rwptr, "write position")
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
