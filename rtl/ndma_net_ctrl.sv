// ndma_net_ctrl: the network layer controller, the core's sending side.
//
// Decodes the CPU-side network instructions of the instruction being executed:
//   sid imm          sets the node ID (once: only while the ID is still unset,
//                    and never to the reserved IDs 0x00 and 0xFF)
//   smsg $rs, imm    sends byte imm[7:0] to the node whose ID is in $rs
//   smsgr $rs,$rt,k  sends byte k of $rt (k = 3 is the most significant byte)
//   bcst imm         broadcasts byte imm[7:0] (destination 0xFF)
//   bcstr $rs, k     broadcasts byte k of $rs
// A send raises tx_valid (the send flag) with the destination and data byte.
// The network layer takes it when tx_ready is high; until then stall is high and
// the core holds the instruction, so no message is lost or sent twice. Timing:
// tx_valid and stall are combinational from the instruction; the ID register
// updates on the rising edge. The instruction set and the once-only ID follow
// the architecture; the stall handshake replaces the original negative-edge
// send flag and is this implementation's choice for a single-clock design.
module ndma_net_ctrl
  import ndma_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,        // the instruction executes this cycle
  input  logic [31:0] instr,
  input  logic [31:0] rs_data,
  input  logic [31:0] rt_data,
  output logic [7:0]  my_id,
  output logic        tx_valid,
  output logic [7:0]  tx_dest,
  output logic [7:0]  tx_data,
  input  logic        tx_ready,
  output logic        stall
);
  opcode_e    op;
  logic       is_send;
  logic [1:0] k;

  assign op = opcode_e'(instr[31:26]);
  assign k  = instr[1:0];

  always_comb begin
    is_send = 1'b0;
    tx_dest = ID_BCAST;
    tx_data = instr[7:0];
    unique case (op)
      OP_BCST:  begin is_send = 1'b1; tx_dest = ID_BCAST;    tx_data = instr[7:0];        end
      OP_SMSG:  begin is_send = 1'b1; tx_dest = rs_data[7:0]; tx_data = instr[7:0];        end
      OP_BCSTR: begin is_send = 1'b1; tx_dest = ID_BCAST;    tx_data = rs_data[8*k +: 8]; end
      OP_SMSGR: begin is_send = 1'b1; tx_dest = rs_data[7:0]; tx_data = rt_data[8*k +: 8]; end
      default: ;
    endcase
  end

  assign tx_valid = en && is_send;
  assign stall    = tx_valid && !tx_ready;

  always_ff @(posedge clk) begin
    if (rst) my_id <= ID_NULL;
    else if (en && op == OP_SID && my_id == ID_NULL &&
             instr[7:0] != ID_NULL && instr[7:0] != ID_BCAST)
      my_id <= instr[7:0];
  end
endmodule
