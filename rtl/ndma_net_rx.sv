// ndma_net_rx: the network message register of the register file.
//
// Every message byte the network layer delivers to this node is stored in a
// 32-bit network register at the position given by a message counter, the most
// significant byte first (the senders send byte 3, 2, 1, 0 in that order). The
// fourth byte completes an instruction: instr_valid pulses for one cycle with
// the assembled word, and the counter starts again at zero. Timing: a byte on
// rx_valid at a rising edge gives instr_valid in the following cycle. The
// byte order follows the architecture's send conventions; clearing the counter
// only at reset is this implementation's choice.
module ndma_net_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  output logic        instr_valid,
  output logic [31:0] instr
);
  logic [1:0]  cnt;
  logic [23:0] partial;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      partial     <= '0;
      instr_valid <= 1'b0;
      instr       <= '0;
    end else begin
      instr_valid <= 1'b0;
      if (rx_valid) begin
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) begin
          instr       <= {partial, rx_data};
          instr_valid <= 1'b1;
        end else begin
          partial <= {partial[15:0], rx_data};
        end
      end
    end
  end
endmodule
