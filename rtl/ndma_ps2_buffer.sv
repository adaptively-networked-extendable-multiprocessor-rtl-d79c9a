// ndma_ps2_buffer: PS/2 keyboard receiver with a one-character input buffer,
// read by a core through one input port and one output port.
//
// The keyboard sends 11-bit frames on ps2_data, each bit valid at a falling
// edge of ps2_clk: a 0 start bit, eight data bits LSB first, odd parity and a
// 1 stop bit. Both lines are synchronised to clk and sampled at the falling
// edge of the synchronised ps2_clk; a frame with a bad start, parity or stop
// bit is discarded. Each good byte is a scan code (set 2). A key press (make
// code) of a letter, digit, space or enter is translated to its lower-case
// ASCII code and placed in the buffer if the buffer is empty; key releases
// (0xF0 followed by the code), the 0xE0 prefix and other keys are ignored, and
// a key pressed while the buffer is full is lost.
//
// Core interface (the keyboard API of the architecture's software):
//   status (to an input port):  [7:0] character, [8] complete, [9] empty,
//                               other bits 0
//   ctrl   (from an output port): [0] request
// A read is: wait for empty = 0; set request; wait for complete = 1; read the
// character; clear request. complete rises the cycle after request is seen
// with a character buffered; when request drops the buffer empties and
// complete clears in the same clock edge. Everything is synchronous to clk.
//
// The status/request protocol and the ASCII result follow the architecture's
// keyboard API; frame checking, the translation table (letters, digits,
// space, enter) and the one-entry buffer are this implementation's choices.
module ndma_ps2_buffer (
  input  logic        clk,
  input  logic        rst,
  input  logic        ps2_clk,     // from the keyboard, idle high
  input  logic        ps2_data,    // from the keyboard, idle high
  input  logic [31:0] ctrl,        // output port of the core, bit 0 = request
  output logic [31:0] status       // input port of the core
);
  // ---------------- PS/2 frame receiver ----------------
  logic [2:0]  clk_s;              // synchroniser and edge detector
  logic [1:0]  dat_s;
  logic [10:0] frame;              // shifts in from the top, LSB first
  logic [3:0]  nbits;
  logic        code_valid;
  logic [7:0]  code;
  logic        fall;

  assign fall = clk_s[2] && !clk_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s      <= '1;
      dat_s      <= '1;
      frame      <= '0;
      nbits      <= '0;
      code_valid <= 1'b0;
      code       <= '0;
    end else begin
      clk_s      <= {clk_s[1:0], ps2_clk};
      dat_s      <= {dat_s[0], ps2_data};
      code_valid <= 1'b0;
      if (fall) begin
        frame <= {dat_s[1], frame[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // frame[0] is the start bit once the stop bit (dat_s[1]) arrives
          if (!frame[1] && dat_s[1] && ^frame[10:2]) begin
            code_valid <= 1'b1;
            code       <= frame[9:2];
          end
        end else begin
          nbits <= nbits + 4'd1;
        end
      end
    end
  end

  // ---------------- scan code (set 2) to ASCII ----------------
  function automatic logic [7:0] to_ascii(logic [7:0] sc);
    unique case (sc)
      8'h1C: return "a";  8'h32: return "b";  8'h21: return "c";  8'h23: return "d";
      8'h24: return "e";  8'h2B: return "f";  8'h34: return "g";  8'h33: return "h";
      8'h43: return "i";  8'h3B: return "j";  8'h42: return "k";  8'h4B: return "l";
      8'h3A: return "m";  8'h31: return "n";  8'h44: return "o";  8'h4D: return "p";
      8'h15: return "q";  8'h2D: return "r";  8'h1B: return "s";  8'h2C: return "t";
      8'h3C: return "u";  8'h2A: return "v";  8'h1D: return "w";  8'h22: return "x";
      8'h35: return "y";  8'h1A: return "z";
      8'h45: return "0";  8'h16: return "1";  8'h1E: return "2";  8'h26: return "3";
      8'h25: return "4";  8'h2E: return "5";  8'h36: return "6";  8'h3D: return "7";
      8'h3E: return "8";  8'h46: return "9";
      8'h29: return " ";  8'h5A: return 8'h0A;
      default: return 8'h00;
    endcase
  endfunction

  // ---------------- one-character buffer and handshake ----------------
  logic       release_next;        // last code was 0xF0
  logic       empty, complete;
  logic [7:0] char_q, ascii;

  assign ascii  = to_ascii(code);
  assign status = {22'd0, empty, complete, char_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      release_next <= 1'b0;
      empty        <= 1'b1;
      complete     <= 1'b0;
      char_q       <= '0;
    end else begin
      if (code_valid) begin
        if (code == 8'hF0)      release_next <= 1'b1;
        else if (code != 8'hE0) release_next <= 1'b0;
        if (!release_next && code != 8'hF0 && code != 8'hE0 && ascii != 8'h00 && empty) begin
          char_q <= ascii;
          empty  <= 1'b0;
        end
      end
      if (ctrl[0] && !empty) complete <= 1'b1;
      if (!ctrl[0] && complete) begin
        complete <= 1'b0;
        empty    <= 1'b1;
      end
    end
  end
endmodule
