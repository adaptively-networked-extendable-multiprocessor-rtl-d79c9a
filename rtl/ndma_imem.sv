// ndma_imem: dual-port instruction memory of one NDMA node.
//
// DEPTH words of 32 bits. Port A is the core's fetch port and reads
// combinationally (the core executes one instruction per cycle). Port B is a
// write port, shared by the network memory controller and the bootloader, and
// writes on the rising edge, so a word can be fetched and another written in
// the same cycle, which is why the architecture made this memory dual ported.
// At power-up the memory holds a small start-up image: "sid BOOT_ID; nop; nop;
// j 1", the ID-setting loop every node starts from; the rest is zero (nop).
// Setting BOOT_ID to 0 leaves the node without an ID until a program sets one.
module ndma_imem
  import ndma_pkg::*;
#(
  parameter int unsigned DEPTH   = 1024,
  parameter logic [7:0]  BOOT_ID = 8'd0
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'h0000_0000;
    mem[0] = enc_j(OP_SID, int'(BOOT_ID));
    mem[3] = enc_j(OP_J, 1);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
