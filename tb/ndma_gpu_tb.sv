// Testbench for ndma_gpu: issues commands with the core's protocol (command
// with valid bit 16, wait for complete, clear valid) to plot random pixels,
// including some off screen and some overwritten, then watches one whole VGA
// frame and compares every visible pixel that was plotted with a reference
// copy of the screen. Also checks the handshake timing and the scan timing:
// 800 vga_clk per line with a 96-clock hsync pulse, 525 lines per frame with a
// 2-line vsync pulse, and black outside the visible area.
`include "tb/ndma_tb.svh"
module ndma_gpu_tb;
  localparam int W = 640, H = 480;
  int checks = 0, failures = 0;
  logic clk = 0, vclk = 0, rst = 1;
  logic [31:0] cmd = '0, done;
  logic hs, vs;
  logic [2:0] r, g;
  logic [1:0] b;
  always #5 clk = ~clk;
  always #4 vclk = ~vclk;
  ndma_gpu dut (.clk, .rst, .cmd, .done, .vga_clk(vclk), .vga_hsync(hs), .vga_vsync(vs),
    .vga_r(r), .vga_g(g), .vga_b(b));

  int ref_color [int];     // plotted pixels, key y*W+x

  task automatic issue(logic [15:0] instr);
    @(negedge clk); cmd = {15'd0, 1'b1, instr};
    @(posedge clk); #1;
    `CHECK(done, 32'd1, "complete one clock after valid")
    @(negedge clk); cmd = '0;
    @(posedge clk); #1;
    `CHECK(done, 32'd0, "complete clears after valid drops")
  endtask

  task automatic plot(int x, int y, logic [7:0] c);
    issue(16'h0000 + 16'(x));
    issue(16'h0400 + 16'(y));
    issue(16'h1C00 + 16'(c));
    if (x < W && y < H) ref_color[y * W + x] = c;
  endtask

  initial begin
    int x, y, hl, hp, vl, seen, plotted;
    logic [7:0] c;
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 300; i++) begin
      x = (i % 10 == 0) ? $urandom_range(W, 1023) : $urandom_range(0, W - 1);
      y = (i % 13 == 0) ? $urandom_range(H, 1023) : $urandom_range(0, H - 1);
      if (i % 17 == 0 && i > 0) begin x = 5; y = 7; end   // overwrites
      plot(x, y, 8'($urandom));
    end
    // a character command completes without drawing
    issue(16'h1000 + 16'("A"));
    issue(16'h1400 + 16'hFF);
    plotted = ref_color.num();
    // scan timing: one line
    @(posedge vclk); while (!(dut.hc == 0 && dut.vc == 0)) @(posedge vclk);
    hl = 0; hp = 0;
    for (int i = 0; i < 1600; i++) begin
      @(posedge vclk); #1;
      if (!hs) hl++;
      if (i > 0 && hs === 1'b0 && hp == 0) hp = i;
    end
    `CHECK(hl, 2 * 96, "hsync low 96 clocks per line")
    // a whole frame: compare plotted pixels, count vsync, check blanking
    while (!(dut.hc == 0 && dut.vc == 0)) @(posedge vclk);
    vl = 0; seen = 0;
    for (int i = 0; i < 800 * 525; i++) begin
      int sx, sy;
      sx = int'(dut.hc); sy = int'(dut.vc);
      @(posedge vclk); #1;
      // outputs now belong to (sx, sy)
      if (sx == 0 && !vs) vl++;
      if (sx < W && sy < H) begin
        if (ref_color.exists(sy * W + sx)) begin
          `CHECK({r, g, b}, 8'(ref_color[sy * W + sx]), "plotted pixel on screen")
          seen++;
        end
      end else if ({r, g, b} != 0) begin
        failures++; $display("FAIL color outside the visible area at %0d,%0d", sx, sy);
      end
    end
    `CHECK(vl, 2, "vsync low 2 lines per frame")
    `CHECK(seen, plotted, "every plotted pixel seen once")
    `CHECK((plotted > 200), 1'b1, "enough pixels plotted")
    `TB_DONE
  end
  initial begin repeat (2_000_000) @(posedge clk); failures++; $display("watchdog"); `TB_DONE end
endmodule
