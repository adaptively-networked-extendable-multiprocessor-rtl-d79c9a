// ndma_gpu: a pixel-plotting graphics unit with a VGA output, driven by a core
// through one output port and one input port.
//
// Command interface (the graphics API of the architecture's software):
//   cmd  (from an output port): [15:0] instruction, [16] valid
//   done (to an input port):    [0] complete, other bits 0
// An instruction is a 6-bit operation in [15:10] and a 10-bit value in [9:0]:
//   0x0000 + x       set the X coordinate (0..639)
//   0x0400 + y       set the Y coordinate (0..479)
//   0x1C00 + color   plot the pixel (X, Y) with the 8-bit color value[7:0]
// Any other operation (such as the character commands 0x1000 and 0x1400 of the
// API) is accepted and completes without drawing. The core writes the command
// with valid set, waits for complete, then clears valid; complete rises on the
// clock edge after valid is seen and falls on the edge after valid drops, and
// a command is carried out once per valid pulse. A pixel outside the screen is
// not drawn.
//
// The frame buffer holds one byte per pixel, W x H, written on clk and read on
// vga_clk (a dual-clock memory). The VGA side scans it with the usual 640x480
// timing (800 x 525 clocks per frame, negative sync pulses of 96 clocks and
// 2 lines) at one pixel per vga_clk, which should be about 25 MHz; the 8-bit
// color goes out as 3-3-2 red/green/blue, black outside the visible area.
// Sync, blanking and color are registered together, so all outputs lag the
// scan counters by one vga_clk and stay aligned with each other.
//
// The command/complete handshake, the X, Y and plot commands and the screen
// size follow the architecture's graphics API and programs; the frame buffer
// organisation, the color mapping and the scan-out timing values are this
// implementation's choices, and character drawing is not implemented.
module ndma_gpu #(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] cmd,
  output logic [31:0] done,
  input  logic        vga_clk,
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [2:0]  vga_r,
  output logic [2:0]  vga_g,
  output logic [1:0]  vga_b
);
  localparam int unsigned AW = $clog2(W * H);

  localparam logic [5:0] OP_SETX = 6'h00;
  localparam logic [5:0] OP_SETY = 6'h01;
  localparam logic [5:0] OP_PLOT = 6'h07;

  // ---------------- command side ----------------
  logic [7:0]  fb [W * H];
  logic [9:0]  x, y;
  logic        complete;
  logic [5:0]  op;
  logic [9:0]  val;

  assign op   = cmd[15:10];
  assign val  = cmd[9:0];
  assign done = {31'd0, complete};

  always_ff @(posedge clk) begin
    if (rst) begin
      x        <= '0;
      y        <= '0;
      complete <= 1'b0;
    end else if (cmd[16] && !complete) begin
      complete <= 1'b1;
      unique case (op)
        OP_SETX: x <= val;
        OP_SETY: y <= val;
        default: ;
      endcase
    end else if (!cmd[16]) begin
      complete <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && cmd[16] && !complete && op == OP_PLOT && x < 10'(W) && y < 10'(H))
      fb[AW'(y) * AW'(W) + AW'(x)] <= val[7:0];
  end

  // ---------------- VGA scan-out ----------------
  localparam int unsigned HTOT = 800, HSYNC_AT = 656, HSYNC_LEN = 96;
  localparam int unsigned VTOT = 525, VSYNC_AT = 490, VSYNC_LEN = 2;

  logic [9:0] hc, vc;
  logic       vis;
  logic [7:0] pix;

  always_ff @(posedge vga_clk) begin
    if (rst) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 10'(HTOT - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(VTOT - 1)) ? '0 : vc + 10'd1;
    end else begin
      hc <= hc + 10'd1;
    end
  end

  always_ff @(posedge vga_clk) begin
    vga_hsync <= !(hc >= 10'(HSYNC_AT) && hc < 10'(HSYNC_AT + HSYNC_LEN));
    vga_vsync <= !(vc >= 10'(VSYNC_AT) && vc < 10'(VSYNC_AT + VSYNC_LEN));
    vis       <= (hc < 10'(W)) && (vc < 10'(H));
    pix       <= fb[AW'(vc < 10'(H) ? vc : '0) * AW'(W) + AW'(hc < 10'(W) ? hc : '0)];
  end

  assign {vga_r, vga_g, vga_b} = vis ? pix : 8'h00;
endmodule
