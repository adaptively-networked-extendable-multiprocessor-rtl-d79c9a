// ndma_top: a six-node NDMA multiprocessor on a 2 x 3 mesh.
//
// Nodes sit on a ROWS x COLS grid; each node's east bus feeds its east
// neighbour's west input and so on, and the buses at the edge of the mesh are
// left idle. With the default 2 x 3 grid the node IDs follow the six-core
// system of the architecture:
//       row 0:  1 (master)   2   5
//       row 1:  6            3   4
// (any other size numbers the nodes 1, 2, 3, ... row by row). The master node
// at row 0, column 0 is the one the host loads: an RS232 receiver and the
// bootloader write its instruction memory while boot_mode is high. The other
// nodes start from their ID-setting loop and are programmed by the master
// through the network. The master's in/out ports 1 and 5 connect to the
// graphics unit (ndma_gpu, completion flag in, command out) and ports 2 and 6
// to the keyboard buffer (ndma_ps2_buffer, status in, request out), the port
// numbers used by the architecture's graphics and keyboard routines; the
// master's input ports 1 and 2 from outside are therefore not used. All other
// in/out ports of every node are brought out.
// Clocking: clk is the board clock (CLK_HZ). An ndma_clock_divider divides it
// by CLK_DIV into the core clock that runs the nodes, the RS232 receiver, the
// bootloader and the command sides of both peripherals, so these all share one
// clock; only the scan-out of the graphics unit runs on vga_clk. The default
// divides 27 MHz by 9 into the architecture's 3 MHz processor clock;
// CLK_DIV = 1 runs everything on clk. rst is sampled on core clock edges, so
// hold it for at least two core clock periods. The baud rate is counted in
// core clocks (CLK_HZ / CLK_DIV); see ndma_uart_rx.
//
// Lint note: verilator reports UNOPTFLAT on the bus array nout. A cut-through
// bus passes a node's incoming bus straight to the opposite outgoing bus, so
// each element of nout can depend combinationally on another element of the
// same array. The path always continues in one direction (west input to east
// output, north input to south output and so on) and ends at the mesh edge, so
// there is no real combinational loop; the warning comes from the tool treating
// the whole array as one signal, and it is left as is.
module ndma_top
  import ndma_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 3,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter int unsigned NPORTS     = 8,
  parameter int unsigned THRESH     = 8,
  parameter bit          ADAPT      = 1'b1,
  parameter int unsigned CLK_HZ     = 27_000_000,
  parameter int unsigned CLK_DIV    = 9,
  parameter int unsigned BAUD       = 115_200,
  localparam int unsigned N         = ROWS * COLS,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               uart_rxd,
  input  logic                               boot_mode,
  input  logic [N-1:0]                       resume,
  input  logic [N-1:0][NPORTS-1:0][31:0]     in_ports,
  output logic [N-1:0][NPORTS-1:0][31:0]     out_ports,
  output logic [N-1:0][7:0]                  node_id,
  output logic [N-1:0][IAW-1:0]              pc,
  output logic [N-1:0]                       halted,
  output logic [N-1:0]                       stall,
  output logic [N-1:0]                       net_jump,
  output logic [N-1:0]                       rx_valid,
  output logic [N-1:0]                       collision,
  output logic [N-1:0][3:0]                  thru,
  output logic [IAW:0]                       boot_words,
  // peripherals of the master node
  input  logic                               ps2_clk,
  input  logic                               ps2_data,
  input  logic                               vga_clk,
  output logic                               vga_hsync,
  output logic                               vga_vsync,
  output logic [2:0]                         vga_r,
  output logic [2:0]                         vga_g,
  output logic [1:0]                         vga_b
);
  // master ports used by the graphics unit and the keyboard buffer
  localparam int unsigned GPU_DONE_PORT = 1, KBD_STATUS_PORT = 2;
  localparam int unsigned GPU_CMD_PORT  = 5, KBD_CTRL_PORT   = 6;

  function automatic logic [7:0] node_boot_id(int r, int c);
    if (ROWS == 2 && COLS == 3) begin
      if (r == 0) return (c == 0) ? 8'd1 : (c == 1) ? 8'd2 : 8'd5;
      else        return (c == 0) ? 8'd6 : (c == 1) ? 8'd3 : 8'd4;
    end
    return 8'(r * COLS + c + 1);
  endfunction

  // core clock
  logic cclk;

  ndma_clock_divider #(.DIV(CLK_DIV)) u_clkdiv (.clk_in(clk), .clk_out(cclk));

  // boot path into the master node
  logic           u_valid, boot_we, cpu_hold;
  logic [7:0]     u_data;
  logic [IAW-1:0] boot_addr;
  logic [31:0]    boot_data;

  ndma_uart_rx #(.CLK_HZ(CLK_HZ / CLK_DIV), .BAUD(BAUD)) u_uart (
    .clk(cclk), .rst, .rxd(uart_rxd), .valid(u_valid), .data(u_data)
  );

  ndma_bootloader #(.AW(IAW)) u_boot (
    .clk(cclk), .rst, .boot_mode, .byte_valid(u_valid), .byte_data(u_data),
    .imem_we(boot_we), .imem_addr(boot_addr), .imem_data(boot_data),
    .cpu_hold, .words_loaded(boot_words)
  );

  if (NPORTS < 7) begin : g_check_ports
    $error("ndma_top: the peripherals need NPORTS of at least 7");
  end

  // peripherals on the master's in/out ports
  logic [31:0] gpu_done, kbd_status;

  ndma_gpu u_gpu (
    .clk(cclk), .rst, .cmd(out_ports[0][GPU_CMD_PORT]), .done(gpu_done),
    .vga_clk, .vga_hsync, .vga_vsync, .vga_r, .vga_g, .vga_b
  );

  ndma_ps2_buffer u_kbd (
    .clk(cclk), .rst, .ps2_clk, .ps2_data, .ctrl(out_ports[0][KBD_CTRL_PORT]), .status(kbd_status)
  );

  logic [N-1:0][NPORTS-1:0][31:0] node_in;
  always_comb begin
    node_in = in_ports;
    node_in[0][GPU_DONE_PORT]   = gpu_done;
    node_in[0][KBD_STATUS_PORT] = kbd_status;
  end

  // mesh
  msg_t nin  [N][4];
  msg_t nout [N][4];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned I = r * COLS + c;
      assign nin[I][DIR_N] = (r > 0)        ? nout[I - COLS][DIR_S] : '0;
      assign nin[I][DIR_S] = (r < ROWS - 1) ? nout[I + COLS][DIR_N] : '0;
      assign nin[I][DIR_W] = (c > 0)        ? nout[I - 1][DIR_E]    : '0;
      assign nin[I][DIR_E] = (c < COLS - 1) ? nout[I + 1][DIR_W]    : '0;

      ndma_node #(
        .BOOT_ID(node_boot_id(r, c)), .IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH),
        .NPORTS(NPORTS), .THRESH(THRESH), .ADAPT(ADAPT)
      ) u_node (
        .clk       (cclk),
        .rst       (rst || (I == 0 && cpu_hold)),
        .resume    (resume[I]),
        .in_bus    (nin[I]),
        .out_bus   (nout[I]),
        .in_ports  (node_in[I]),
        .out_ports (out_ports[I]),
        .boot_we   (I == 0 && boot_we),
        .boot_addr (boot_addr),
        .boot_data (boot_data),
        .my_id     (node_id[I]),
        .pc        (pc[I]),
        .halted    (halted[I]),
        .stall     (stall[I]),
        .net_jump  (net_jump[I]),
        .rx_valid  (rx_valid[I]),
        .collision (collision[I]),
        .thru      (thru[I])
      );
    end
  end
endmodule
