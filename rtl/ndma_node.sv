// ndma_node: one node of the NDMA multiprocessor.
//
// A node is a core (ndma_cpu) with its own instruction memory and data memory
// and a network layer (ndma_net_layer) with four buses to its mesh neighbours.
// Each node owns its data memory exclusively; its instruction memory can be
// written by other nodes through the network (dispatched instructions) and by
// the bootloader port. The bootloader port has priority over the network's
// writes. Every node powers up running "sid BOOT_ID; nop; nop; j 1", which
// gives it its ID and parks it in a loop until code is dispatched to it.
// Interface: mesh buses in_bus/out_bus indexed by side (0 N, 1 E, 2 S, 3 W),
// in/out ports for peripherals, a boot write port and status outputs. Sizes
// default to 1024-word memories.
module ndma_node
  import ndma_pkg::*;
#(
  parameter logic [7:0]  BOOT_ID    = 8'd1,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter int unsigned NPORTS     = 8,
  parameter int unsigned THRESH     = 8,
  parameter bit          ADAPT      = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            resume,
  input  msg_t                            in_bus  [4],
  output msg_t                            out_bus [4],
  input  logic [NPORTS-1:0][31:0]         in_ports,
  output logic [NPORTS-1:0][31:0]         out_ports,
  input  logic                            boot_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0]   boot_addr,
  input  logic [31:0]                     boot_data,
  output logic [7:0]                      my_id,
  output logic [$clog2(IMEM_DEPTH)-1:0]   pc,
  output logic                            halted,
  output logic                            stall,
  output logic                            net_jump,
  output logic                            rx_valid,
  output logic                            collision,
  output logic [3:0]                      thru
);
  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);

  logic [31:0]    instr, dmem_rdata, dmem_wdata, net_wdata;
  logic [IAW-1:0] net_waddr;
  logic [DAW-1:0] dmem_addr;
  logic           net_we, dmem_we;
  logic           tx_valid, tx_ready;
  logic [7:0]     tx_dest, tx_data, rx_data, rx_orig;

  ndma_imem #(.DEPTH(IMEM_DEPTH), .BOOT_ID(BOOT_ID)) u_imem (
    .clk, .raddr(pc), .rdata(instr),
    .we(boot_we || net_we),
    .waddr(boot_we ? boot_addr : net_waddr),
    .wdata(boot_we ? boot_data : net_wdata)
  );

  ndma_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(dmem_addr), .rdata(dmem_rdata), .we(dmem_we), .wdata(dmem_wdata)
  );

  ndma_cpu #(.IAW(IAW), .DAW(DAW), .NPORTS(NPORTS)) u_cpu (
    .clk, .rst, .resume,
    .pc, .instr,
    .imem_we(net_we), .imem_waddr(net_waddr), .imem_wdata(net_wdata),
    .dmem_addr, .dmem_rdata, .dmem_we, .dmem_wdata,
    .in_ports, .out_ports,
    .my_id, .tx_valid, .tx_dest, .tx_data, .tx_ready,
    .rx_valid, .rx_data,
    .halted, .stall, .net_jump
  );

  ndma_net_layer #(.THRESH(THRESH), .ADAPT(ADAPT)) u_net (
    .clk, .rst, .my_id, .in_bus, .out_bus,
    .tx_valid, .tx_dest, .tx_data, .tx_ready,
    .rx_valid, .rx_data, .rx_orig,
    .collision, .thru
  );
endmodule
