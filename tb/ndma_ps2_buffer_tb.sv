// Testbench for ndma_ps2_buffer: plays a keyboard on the PS/2 lines (11-bit
// frames, about 20 clocks per PS/2 clock period) and reads characters with the
// core's protocol: wait for empty = 0, raise request, wait for complete, read
// the character, drop request. Checks key presses of letters, digits, space
// and enter against a reference scan-code table, that key releases (0xF0
// code), the 0xE0 prefix, unknown keys and frames with a parity error give no
// character, that a key pressed while a character is buffered is lost, and
// the handshake timing (complete one clock after request, empty one clock
// after request drops).
`include "tb/ndma_tb.svh"
module ndma_ps2_buffer_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, kclk = 1, kdat = 1;
  logic [31:0] ctrl = '0, status;
  always #5 clk = ~clk;
  ndma_ps2_buffer dut (.clk, .rst, .ps2_clk(kclk), .ps2_data(kdat), .ctrl, .status);

  // reference table: scan code set 2 of the keys the buffer translates
  logic [7:0] sc [38];
  logic [7:0] ch [38];
  initial begin
    string s = "abcdefghijklmnopqrstuvwxyz0123456789";
    logic [7:0] codes [36] = '{8'h1C, 8'h32, 8'h21, 8'h23, 8'h24, 8'h2B, 8'h34, 8'h33, 8'h43,
      8'h3B, 8'h42, 8'h4B, 8'h3A, 8'h31, 8'h44, 8'h4D, 8'h15, 8'h2D, 8'h1B, 8'h2C, 8'h3C,
      8'h2A, 8'h1D, 8'h22, 8'h35, 8'h1A, 8'h45, 8'h16, 8'h1E, 8'h26, 8'h25, 8'h2E, 8'h36,
      8'h3D, 8'h3E, 8'h46};
    for (int i = 0; i < 36; i++) begin sc[i] = codes[i]; ch[i] = s[i]; end
    sc[36] = 8'h29; ch[36] = " ";
    sc[37] = 8'h5A; ch[37] = 8'h0A;
  end

  task automatic key_byte(logic [7:0] b, bit bad_parity = 0);
    logic [10:0] f;
    f = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kdat = f[i];
      repeat (10) @(posedge clk);
      kclk = 0;
      repeat (10) @(posedge clk);
      kclk = 1;
    end
    repeat (30) @(posedge clk);
  endtask

  task automatic read_char(output logic [7:0] c);
    int n;
    n = 0;
    while (status[9] && n < 1000) begin @(posedge clk); n++; end
    `CHECK(status[9], 1'b0, "character waiting")
    @(negedge clk); ctrl = 32'd1;
    @(posedge clk); #1;
    `CHECK(status[8], 1'b1, "complete one clock after request")
    c = status[7:0];
    @(negedge clk); ctrl = 32'd0;
    @(posedge clk); #1;
    `CHECK(status[9:8], 2'b10, "empty one clock after request drops")
  endtask

  initial begin
    logic [7:0] c;
    int k;
    repeat (3) @(posedge clk); rst <= 0; repeat (3) @(posedge clk); #1;
    `CHECK(status, 32'h200, "idle: empty")
    // every key, pressed and released, in random order
    for (int i = 0; i < 80; i++) begin
      k = $urandom_range(0, 37);
      key_byte(sc[k]);
      #1;
      `CHECK(status[31:10], 22'd0, "upper status bits zero")
      read_char(c);
      `CHECK(c, ch[k], "ASCII of the key")
      key_byte(8'hF0); key_byte(sc[k]);
      #1;
      `CHECK(status[9], 1'b1, "release gives no character")
    end
    // extended prefix, unknown key, parity error
    key_byte(8'hE0); #1; `CHECK(status[9], 1'b1, "E0 prefix ignored")
    key_byte(8'h05); #1; `CHECK(status[9], 1'b1, "unknown key ignored")
    key_byte(8'h1C, 1); #1; `CHECK(status[9], 1'b1, "parity error discarded")
    // a key while full is lost
    key_byte(8'h1A); key_byte(8'h3B);
    read_char(c);
    `CHECK(c, "z", "first key kept")
    repeat (100) @(posedge clk); #1;
    `CHECK(status[9], 1'b1, "second key lost")
    `TB_DONE
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog"); `TB_DONE end
endmodule
