// ndma_alu: the arithmetic and logic unit of the NDMA core.
//
// Purely combinational. Computes the register and immediate operations of the
// instruction set (add, subtract, and, or, xor, set-less-than signed and
// unsigned, the three shifts and load-upper-immediate) from two 32-bit operands
// and a shift amount. The operation set follows the supported instruction tables
// of the architecture; add and subtract wrap and raise no overflow trap (the
// architecture has no exceptions), which is this implementation's choice.
module ndma_alu
  import ndma_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  shamt,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << shamt;
      ALU_SRL:  y = b >> shamt;
      ALU_SRA:  y = $unsigned($signed(b) >>> shamt);
      ALU_LUI:  y = {b[15:0], 16'h0000};
      default:  y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
