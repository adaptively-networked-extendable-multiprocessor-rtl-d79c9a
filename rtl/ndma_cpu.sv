// ndma_cpu: the NDMA core, a single-cycle 32-bit MIPS-like processor whose
// instruction stream can also be driven by the network.
//
// Each cycle the core fetches the word at PC from its instruction memory,
// decodes it, reads the register file, computes in the ALU, reads or writes the
// word-wide data memory and writes the result back: one instruction per cycle,
// with no branch or load delay slots (a branch goes to PC+1+offset, a jump to
// an absolute word address, and a load's result is usable by the next
// instruction). Inside the core sit the blocks of the architecture's CPU: the
// register file, the ALU, the in/out unit, the network layer controller (which
// sends messages and owns the node ID), the network message register (which
// collects four received bytes into an instruction) and the network memory
// controller (which writes received instructions into the instruction memory
// or turns SNIP/JALNET/NDJR into network-driven jumps).
//
// Precedence: in a cycle where the network delivers a JALNET or NDJR the
// core's own instruction is not executed; JALNET saves the unexecuted PC in
// $ra so that a later jr $ra re-runs it. A send that the network layer cannot
// take yet stalls the core (PC and state held) until it can. BREAK halts the
// core after PC+1 is saved; it runs again on the resume input or on a
// network-driven jump. Loads and stores of bytes and halfwords act on the low
// bits of a data word (lb/lbu/lh/lhu extend them; sb/sh store them
// zero-extended), matching the one-value-per-line data layout of the
// architecture's compiler. Network-side instructions fetched from local memory
// do nothing. The opcode values, the stall and the sub-word behaviour are this
// implementation's choices; everything else follows the architecture.
module ndma_cpu
  import ndma_pkg::*;
#(
  parameter int unsigned IAW    = 10,   // instruction memory address bits
  parameter int unsigned DAW    = 10,   // data memory address bits
  parameter int unsigned NPORTS = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    resume,
  // instruction memory: fetch port and network write port
  output logic [IAW-1:0]          pc,
  input  logic [31:0]             instr,
  output logic                    imem_we,
  output logic [IAW-1:0]          imem_waddr,
  output logic [31:0]             imem_wdata,
  // data memory
  output logic [DAW-1:0]          dmem_addr,
  input  logic [31:0]             dmem_rdata,
  output logic                    dmem_we,
  output logic [31:0]             dmem_wdata,
  // in/out ports
  input  logic [NPORTS-1:0][31:0] in_ports,
  output logic [NPORTS-1:0][31:0] out_ports,
  // network layer
  output logic [7:0]              my_id,
  output logic                    tx_valid,
  output logic [7:0]              tx_dest,
  output logic [7:0]              tx_data,
  input  logic                    tx_ready,
  input  logic                    rx_valid,
  input  logic [7:0]              rx_data,
  // status
  output logic                    halted,
  output logic                    stall,
  output logic                    net_jump
);
  // ---------------- fields ----------------
  opcode_e     op;
  funct_e      fn;
  logic [4:0]  rs, rt, rd, shamt;
  logic [15:0] imm;
  logic [31:0] simm, zimm;

  assign op    = opcode_e'(instr[31:26]);
  assign fn    = funct_e'(instr[5:0]);
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign shamt = instr[10:6];
  assign imm   = instr[15:0];
  assign simm  = {{16{imm[15]}}, imm};
  assign zimm  = {16'h0000, imm};

  // ---------------- network receive side ----------------
  logic          nrx_valid;
  logic [31:0]   nrx_instr;
  logic          net_link;
  logic [IAW-1:0] net_target, net_ptr, net_wptr;
  logic [4:0]    net_rs;

  ndma_net_rx u_net_rx (
    .clk, .rst, .rx_valid, .rx_data,
    .instr_valid(nrx_valid), .instr(nrx_instr)
  );

  ndma_net_mem_ctrl #(.AW(IAW)) u_net_mem (
    .clk, .rst,
    .instr_valid(nrx_valid), .instr(nrx_instr),
    .imem_we, .imem_waddr, .imem_wdata,
    .net_jump, .net_link, .net_target, .net_rs,
    .ptr(net_ptr), .wptr(net_wptr)
  );

  // ---------------- register file ----------------
  logic [31:0] rs_val, rt_val, wb_data;
  logic        rf_we;
  logic [4:0]  rf_waddr;

  ndma_regfile u_rf (
    .clk, .rst,
    .rs_addr(net_jump ? net_rs : rs), .rt_addr(rt),
    .rs_data(rs_val), .rt_data(rt_val),
    .we(rf_we), .rd_addr(rf_waddr), .rd_data(wb_data)
  );

  // ---------------- execute enable ----------------
  logic exec, commit;
  assign exec   = !net_jump && !halted;
  assign commit = exec && !stall;

  // ---------------- network send side ----------------
  ndma_net_ctrl u_net_ctrl (
    .clk, .rst, .en(exec), .instr, .rs_data(rs_val), .rt_data(rt_val),
    .my_id, .tx_valid, .tx_dest, .tx_data, .tx_ready, .stall
  );

  // ---------------- decode ----------------
  alu_op_e     alu_op;
  logic        alu_b_imm, alu_imm_zext;
  logic        wr_rd, wr_rt, wr_ra;
  logic        is_load, is_store, is_in, is_out, is_outi, is_break;

  always_comb begin
    alu_op       = ALU_ADD;
    alu_b_imm    = 1'b0;
    alu_imm_zext = 1'b0;
    wr_rd = 1'b0; wr_rt = 1'b0; wr_ra = 1'b0;
    is_load = 1'b0; is_store = 1'b0;
    is_in = 1'b0; is_out = 1'b0; is_outi = 1'b0; is_break = 1'b0;
    unique case (op)
      OP_RTYPE: begin
        wr_rd = 1'b1;
        unique case (fn)
          FN_ADD, FN_ADDU: alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: alu_op = ALU_SUB;
          FN_AND:          alu_op = ALU_AND;
          FN_OR:           alu_op = ALU_OR;
          FN_XOR:          alu_op = ALU_XOR;
          FN_SLT:          alu_op = ALU_SLT;
          FN_SLTU:         alu_op = ALU_SLTU;
          FN_SLL:          alu_op = ALU_SLL;
          FN_SRL:          alu_op = ALU_SRL;
          FN_SRA:          alu_op = ALU_SRA;
          FN_BREAK:        begin wr_rd = 1'b0; is_break = 1'b1; end
          default:         wr_rd = 1'b0;           // jr and unknown
        endcase
      end
      OP_ADDI, OP_ADDIU: begin alu_op = ALU_ADD;  alu_b_imm = 1'b1; wr_rt = 1'b1; end
      OP_SLTI:           begin alu_op = ALU_SLT;  alu_b_imm = 1'b1; wr_rt = 1'b1; end
      OP_SLTIU:          begin alu_op = ALU_SLTU; alu_b_imm = 1'b1; wr_rt = 1'b1; end
      OP_ANDI:  begin alu_op = ALU_AND; alu_b_imm = 1'b1; alu_imm_zext = 1'b1; wr_rt = 1'b1; end
      OP_ORI:   begin alu_op = ALU_OR;  alu_b_imm = 1'b1; alu_imm_zext = 1'b1; wr_rt = 1'b1; end
      OP_XORI:  begin alu_op = ALU_XOR; alu_b_imm = 1'b1; alu_imm_zext = 1'b1; wr_rt = 1'b1; end
      OP_LUI:   begin alu_op = ALU_LUI; alu_b_imm = 1'b1; alu_imm_zext = 1'b1; wr_rt = 1'b1; end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin is_load = 1'b1; wr_rt = 1'b1; end
      OP_SB, OP_SH, OP_SW:                 is_store = 1'b1;
      OP_JAL:   wr_ra = 1'b1;
      OP_IN:    begin is_in = 1'b1; wr_rt = 1'b1; end
      OP_OUT:   is_out = 1'b1;
      OP_OUTI:  is_outi = 1'b1;
      default: ;
    endcase
  end

  // ---------------- ALU ----------------
  logic [31:0] alu_y;
  logic        alu_zero;
  ndma_alu u_alu (
    .op(alu_op), .a(rs_val),
    .b(alu_b_imm ? (alu_imm_zext ? zimm : simm) : rt_val),
    .shamt, .y(alu_y), .zero(alu_zero)
  );

  // ---------------- data memory ----------------
  assign dmem_addr = DAW'(rs_val + simm);
  assign dmem_we   = commit && is_store;
  always_comb begin
    unique case (op)
      OP_SB:   dmem_wdata = {24'h0, rt_val[7:0]};
      OP_SH:   dmem_wdata = {16'h0, rt_val[15:0]};
      default: dmem_wdata = rt_val;
    endcase
  end

  logic [31:0] load_val;
  always_comb begin
    unique case (op)
      OP_LB:   load_val = {{24{dmem_rdata[7]}}, dmem_rdata[7:0]};
      OP_LBU:  load_val = {24'h0, dmem_rdata[7:0]};
      OP_LH:   load_val = {{16{dmem_rdata[15]}}, dmem_rdata[15:0]};
      OP_LHU:  load_val = {16'h0, dmem_rdata[15:0]};
      default: load_val = dmem_rdata;
    endcase
  end

  // ---------------- in/out ----------------
  logic [31:0] io_in;
  ndma_io #(.NPORTS(NPORTS)) u_io (
    .clk, .rst,
    .port(rs[$clog2(NPORTS)-1:0]),
    .out_we(commit && (is_out || is_outi)),
    .out_data(is_outi ? zimm : rt_val),
    .in_data(io_in),
    .in_ports, .out_ports
  );

  // ---------------- next PC ("quick compare" branch unit) ----------------
  logic [IAW-1:0] pc_plus1, br_target;
  logic           take_branch;
  assign pc_plus1  = pc + 1'b1;
  assign br_target = pc_plus1 + IAW'(simm);

  always_comb begin
    unique case (op)
      OP_BEQ:    take_branch = (rs_val == rt_val);
      OP_BNE:    take_branch = (rs_val != rt_val);
      OP_BLEZ:   take_branch = $signed(rs_val) <= 0;
      OP_BGTZ:   take_branch = $signed(rs_val) > 0;
      OP_REGIMM: take_branch = rt[0] ? ($signed(rs_val) >= 0) : ($signed(rs_val) < 0);
      default:   take_branch = 1'b0;
    endcase
  end

  logic [IAW-1:0] pc_next;
  always_comb begin
    if (net_jump)                          pc_next = net_link ? net_target : IAW'(rs_val);
    else if (!commit)                      pc_next = pc;
    else if (op == OP_J || op == OP_JAL)   pc_next = instr[IAW-1:0];
    else if (op == OP_RTYPE && fn == FN_JR) pc_next = IAW'(rs_val);
    else if (take_branch)                  pc_next = br_target;
    else                                   pc_next = pc_plus1;
  end

  // ---------------- write back (write data mux) ----------------
  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = rd;
    wb_data  = alu_y;
    if (net_jump) begin
      rf_we    = net_link;
      rf_waddr = 5'(REG_RA);
      wb_data  = 32'(pc);
    end else if (commit) begin
      if (wr_rd)      begin rf_we = 1'b1; rf_waddr = rd; wb_data = alu_y; end
      else if (wr_ra) begin rf_we = 1'b1; rf_waddr = 5'(REG_RA); wb_data = 32'(pc_plus1); end
      else if (wr_rt) begin
        rf_we    = 1'b1;
        rf_waddr = rt;
        wb_data  = is_load ? load_val : (is_in ? io_in : alu_y);
      end
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      halted <= 1'b0;
    end else begin
      pc <= pc_next;
      if (net_jump || resume)      halted <= 1'b0;
      else if (commit && is_break) halted <= 1'b1;
    end
  end
endmodule
