// ndma_dmem: single-port data memory of one NDMA node.
//
// DEPTH lines of 32 bits, addressed by word (the stack moves in steps of one).
// Reads are combinational, writes happen on the rising edge when we is high.
// Only the owning core reaches this memory; other nodes cannot touch it. Each
// line holds one whole word, so sub-word stores and loads act on the low bits
// of a line (see the core). The contents start at zero, this implementation's
// choice, so that a program reading an unwritten line sees a defined value.
module ndma_dmem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [31:0]              rdata,
  input  logic                     we,
  input  logic [31:0]              wdata
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'h0000_0000;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
