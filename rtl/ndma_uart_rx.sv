// ndma_uart_rx: RS232 serial receiver for the bootloader link.
//
// Receives 8N1 frames (one start bit, eight data bits least significant first,
// one stop bit) on rxd, idle high, at CLK_HZ/BAUD clocks per bit (115200 baud
// from a 27 MHz clock by default). The input is synchronised with two flip-flops,
// a falling edge starts a frame, and every bit is sampled in its middle. A frame
// with a valid stop bit gives a one-cycle valid pulse with the byte; a frame
// whose stop bit is low is dropped. The baud rate follows the architecture's
// bootloader link; the receiver itself is a conventional design of this
// implementation.
module ndma_uart_rx #(
  parameter int unsigned CLK_HZ = 27_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  localparam int unsigned CPB = CLK_HZ / BAUD;
  localparam int unsigned CW  = $clog2(CPB + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e      state;
  logic [CW-1:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shift;
  logic [1:0]  sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shift <= '0;
      sync  <= 2'b11;
      valid <= 1'b0;
      data  <= '0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        IDLE: if (!sync[1]) begin state <= START; cnt <= '0; end
        START: begin
          if (cnt == CW'(CPB / 2)) begin
            cnt <= '0;
            state <= sync[1] ? IDLE : DATA;   // glitch: back to idle
            bitn <= '0;
          end else cnt <= cnt + 1'b1;
        end
        DATA: begin
          if (cnt == CW'(CPB - 1)) begin
            cnt   <= '0;
            shift <= {sync[1], shift[7:1]};
            bitn  <= bitn + 3'd1;
            if (bitn == 3'd7) state <= STOP;
          end else cnt <= cnt + 1'b1;
        end
        STOP: begin
          if (cnt == CW'(CPB - 1)) begin
            state <= IDLE;
            cnt   <= '0;
            if (sync[1]) begin valid <= 1'b1; data <= shift; end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
