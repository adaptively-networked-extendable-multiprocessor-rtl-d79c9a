// ndma_pkg: shared types and constants of the NDMA (network driven microprocessor
// architecture) multiprocessor.
//
// Holds the instruction encoding, the 32-bit network message layout and the
// direction codes used by every node. The standard instructions keep the MIPS
// opcode and function-code pairings, as the architecture does; the opcodes of the
// network and in/out instructions (SID, BCST, SMSG, BCSTR, SMSGR, SNIP, JALNET,
// NDJR, IN, OUT, OUTI) are this implementation's own choice, taken from opcode
// values MIPS leaves unused. Memories are word addressed: PC and data addresses
// count 32-bit words, so PC+1 is the next instruction.
//
// Message layout (most significant field first): 8-bit destination ID, 8-bit
// message data, 8-bit origination ID, 4-bit age, 2-bit origination direction,
// 2-bit last taken direction. Destination ID 0x00 is the null message (an idle
// bus) and 0xFF is a broadcast.
package ndma_pkg;

  // ---------------- opcodes (instr[31:26]) ----------------
  typedef enum logic [5:0] {
    OP_RTYPE  = 6'h00,
    OP_REGIMM = 6'h01,   // bltz (rt=0) / bgez (rt=1)
    OP_J      = 6'h02,
    OP_JAL    = 6'h03,
    OP_BEQ    = 6'h04,
    OP_BNE    = 6'h05,
    OP_BLEZ   = 6'h06,
    OP_BGTZ   = 6'h07,
    OP_ADDI   = 6'h08,
    OP_ADDIU  = 6'h09,
    OP_SLTI   = 6'h0A,
    OP_SLTIU  = 6'h0B,
    OP_ANDI   = 6'h0C,
    OP_ORI    = 6'h0D,
    OP_XORI   = 6'h0E,
    OP_LUI    = 6'h0F,
    OP_LB     = 6'h20,
    OP_LH     = 6'h21,
    OP_LW     = 6'h23,
    OP_LBU    = 6'h24,
    OP_LHU    = 6'h25,
    OP_SB     = 6'h28,
    OP_SH     = 6'h29,
    OP_SW     = 6'h2B,
    // network and in/out instructions (encoding chosen here)
    OP_SID    = 6'h30,   // sid imm8            : set node ID
    OP_BCST   = 6'h31,   // bcst imm8           : broadcast imm8
    OP_SMSG   = 6'h32,   // smsg $rs, imm8      : send imm8 to ID in $rs
    OP_SMSGR  = 6'h33,   // smsgr $rs,$rt,off   : send byte off of $rt to ID in $rs
    OP_BCSTR  = 6'h34,   // bcstr $rs, off      : broadcast byte off of $rs (rt = rs)
    OP_IN     = 6'h35,   // in $rt, port(rs)    : $rt <= input port rs
    OP_OUT    = 6'h36,   // out port(rs), $rt   : output port rs <= $rt
    OP_OUTI   = 6'h37,   // outi port(rs), imm16: output port rs <= zero-extended imm
    OP_SNIP   = 6'h38,   // snip target         : network-side, set network pointer
    OP_JALNET = 6'h39,   // jalnet              : network-side, jump and link to pointer
    OP_NDJR   = 6'h3A    // ndjr $rs            : network-side, jump to $rs
  } opcode_e;

  // ---------------- R-type function codes (instr[5:0]) ----------------
  typedef enum logic [5:0] {
    FN_SLL   = 6'h00,
    FN_SRL   = 6'h02,
    FN_SRA   = 6'h03,
    FN_JR    = 6'h08,
    FN_BREAK = 6'h0D,
    FN_ADD   = 6'h20,
    FN_ADDU  = 6'h21,
    FN_SUB   = 6'h22,
    FN_SUBU  = 6'h23,
    FN_AND   = 6'h24,
    FN_OR    = 6'h25,
    FN_XOR   = 6'h26,
    FN_SLT   = 6'h2A,
    FN_SLTU  = 6'h2B
  } funct_e;

  // ---------------- ALU operations ----------------
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  localparam int unsigned REG_RA = 31;     // link register for jal / jalnet

  // ---------------- network message ----------------
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  typedef struct packed {
    logic [7:0] dest;      // destination node ID
    logic [7:0] data;      // message byte
    logic [7:0] orig;      // originating node ID
    logic [3:0] age;       // hops travelled
    dir_e       orig_dir;  // direction the source sent this copy
    dir_e       last_dir;  // direction of the last hop
  } msg_t;

  localparam logic [7:0] ID_NULL  = 8'h00;
  localparam logic [7:0] ID_BCAST = 8'hFF;

  // Direction a message keeps travelling when it leaves through the opposite side.
  function automatic dir_e dir_opposite(dir_e d);
    return dir_e'(d ^ 2'd2);
  endfunction

  // ---------------- encoding helpers (used by testbenches and ROM images) ----------------
  function automatic logic [31:0] enc_r(funct_e fn, int rd, int rs, int rt, int sh);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] enc_j(opcode_e op, int target);
    return {op, 26'(target)};
  endfunction

endpackage
