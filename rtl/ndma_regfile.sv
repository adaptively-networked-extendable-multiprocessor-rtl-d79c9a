// ndma_regfile: the NDMA general purpose register file.
//
// 32 registers of 32 bits with two combinational read ports (RS, RT) and one
// write port that is written on the rising clock edge, as a single-cycle core
// needs. Register 0 always reads zero and ignores writes; register 31 is the
// link register of JAL and JALNET. The register names and the RS/RT/RD ports
// follow the datapath of the architecture; the synchronous reset of every
// register to zero is this implementation's choice, so programs start from a
// known state.
module ndma_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] rs_addr,
  input  logic [$clog2(NREGS)-1:0] rt_addr,
  output logic [XLEN-1:0]          rs_data,
  output logic [XLEN-1:0]          rt_data,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rd_addr,
  input  logic [XLEN-1:0]          rd_data
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rd_addr != '0) begin
      regs[rd_addr] <= rd_data;
    end
  end

  assign rs_data = (rs_addr == '0) ? '0 : regs[rs_addr];
  assign rt_data = (rt_addr == '0) ? '0 : regs[rt_addr];
endmodule
