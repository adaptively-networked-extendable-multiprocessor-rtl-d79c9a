// Testbench for ndma_alu: random operands for every operation, compared with
// results computed here from the operation's definition.
`include "tb/ndma_tb.svh"
module ndma_alu_tb;
  import ndma_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [31:0] a, b, y, e;
  logic [4:0] sh;
  logic zero;
  ndma_alu dut (.op, .a, .b, .shamt(sh), .y, .zero);
  initial begin
    for (int n = 0; n < 2000; n++) begin
      op = alu_op_e'($urandom_range(0, 10));
      a = $urandom; b = $urandom; sh = 5'($urandom);
      if (n % 7 == 0) b = a;
      #1;
      case (op)
        ALU_ADD:  e = a + b;
        ALU_SUB:  e = a - b;
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_XOR:  e = a ^ b;
        ALU_SLT:  e = (int'(a) < int'(b)) ? 1 : 0;
        ALU_SLTU: e = (a < b) ? 1 : 0;
        ALU_SLL:  e = b << sh;
        ALU_SRL:  e = b >> sh;
        ALU_SRA:  e = 32'(int'(b) >>> sh);
        ALU_LUI:  e = b * 65536;
        default:  e = 0;
      endcase
      `CHECK(y, e, op.name())
      `CHECK(zero, (e == 0), "zero flag")
    end
    `TB_DONE
  end
  initial begin #100000; failures++; $display("watchdog"); `TB_DONE end
endmodule
