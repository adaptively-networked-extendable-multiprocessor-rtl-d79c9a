// ndma_net_mem_ctrl: the network memory controller.
//
// Takes each instruction that arrives complete from the network and either
// stores it in the node's instruction memory or, for the three network-side
// instructions, acts on it without storing it:
//   snip p    sets both the network pointer and the write position to p
//   jalnet    makes the core jump to the network pointer, saving its current PC
//             (not PC+1) in $ra, so the instruction it was about to run resumes
//   ndjr $r   makes the core jump to the address in $r
// Any other instruction is written at the write position, which then advances;
// the pointer stays, so a later jalnet enters the dispatched code at its start.
// Timing: all outputs are combinational from instr_valid/instr; the pointers
// update on the rising edge. The jump request overrides whatever the core was
// about to do in that cycle. Behaviour follows the architecture; the pointer
// reset value (0) is this implementation's choice.
module ndma_net_mem_ctrl
  import ndma_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          instr_valid,
  input  logic [31:0]   instr,
  // instruction memory write port
  output logic          imem_we,
  output logic [AW-1:0] imem_waddr,
  output logic [31:0]   imem_wdata,
  // network-driven jump
  output logic          net_jump,    // jump this cycle
  output logic          net_link,    // jalnet: save PC in $ra, target = pointer
  output logic [AW-1:0] net_target,  // pointer (jalnet)
  output logic [4:0]    net_rs,      // register holding the target (ndjr)
  output logic [AW-1:0] ptr,
  output logic [AW-1:0] wptr
);
  opcode_e op;
  logic    is_snip, is_jalnet, is_ndjr;

  assign op        = opcode_e'(instr[31:26]);
  assign is_snip   = instr_valid && op == OP_SNIP;
  assign is_jalnet = instr_valid && op == OP_JALNET;
  assign is_ndjr   = instr_valid && op == OP_NDJR;

  assign imem_we    = instr_valid && !(is_snip || is_jalnet || is_ndjr);
  assign imem_waddr = wptr;
  assign imem_wdata = instr;

  assign net_jump   = is_jalnet || is_ndjr;
  assign net_link   = is_jalnet;
  assign net_target = ptr;
  assign net_rs     = instr[25:21];

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr  <= '0;
      wptr <= '0;
    end else if (is_snip) begin
      ptr  <= instr[AW-1:0];
      wptr <= instr[AW-1:0];
    end else if (imem_we) begin
      wptr <= wptr + 1'b1;
    end
  end
endmodule
