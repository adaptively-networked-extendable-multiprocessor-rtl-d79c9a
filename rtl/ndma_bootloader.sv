// ndma_bootloader: loads a program image into a node's instruction memory over
// the RS232 link.
//
// While boot_mode is high the node's core is held in reset (cpu_hold) and every
// four received bytes form one 32-bit instruction word, most significant byte
// first, written to instruction memory addresses 0, 1, 2, ... in turn. When
// boot_mode returns low the core starts at address 0 with the new image; the
// next load starts again at address 0. Interface: byte stream in (valid/data,
// from ndma_uart_rx), one instruction memory write port out. The role of the
// bootloader follows the architecture; the word framing, the byte order and
// the boot_mode control are this implementation's choices.
module ndma_bootloader #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          boot_mode,
  input  logic          byte_valid,
  input  logic [7:0]    byte_data,
  output logic          imem_we,
  output logic [AW-1:0] imem_addr,
  output logic [31:0]   imem_data,
  output logic          cpu_hold,
  output logic [AW:0]   words_loaded
);
  logic [1:0]  nbyte;
  logic [23:0] partial;

  assign cpu_hold = boot_mode;

  always_ff @(posedge clk) begin
    if (rst || !boot_mode) begin
      nbyte        <= '0;
      partial      <= '0;
      imem_we      <= 1'b0;
      imem_addr    <= '0;
      imem_data    <= '0;
      if (rst) words_loaded <= '0;
    end else begin
      if (imem_we) imem_addr <= imem_addr + 1'b1;
      imem_we <= 1'b0;
      if (byte_valid) begin
        nbyte <= nbyte + 2'd1;
        if (nbyte == 2'd3) begin
          imem_data    <= {partial, byte_data};
          imem_we      <= 1'b1;
          words_loaded <= words_loaded + 1'b1;
        end else begin
          partial <= {partial[15:0], byte_data};
        end
      end
    end
  end
endmodule
