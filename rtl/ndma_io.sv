// ndma_io: the input/output unit of the NDMA core (IN, OUT and OUTI).
//
// NPORTS output ports, each a 32-bit register that OUT (a register value) or
// OUTI (a zero-extended immediate) writes on the rising edge, and NPORTS 32-bit
// input ports that IN reads combinationally. Peripherals such as the graphics
// unit and the keyboard buffer hang on these ports and talk to programs with a
// valid/complete handshake carried in the port bits. The number of ports (8) and
// the reset of the output registers to zero are this implementation's choices;
// the programs of the architecture use ports 1, 2, 5 and 6.
module ndma_io #(
  parameter int unsigned NPORTS = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [$clog2(NPORTS)-1:0] port,
  input  logic                      out_we,
  input  logic [31:0]               out_data,
  output logic [31:0]               in_data,
  input  logic [NPORTS-1:0][31:0]   in_ports,
  output logic [NPORTS-1:0][31:0]   out_ports
);
  always_ff @(posedge clk) begin
    if (rst) out_ports <= '0;
    else if (out_we) out_ports[port] <= out_data;
  end

  assign in_data = in_ports[port];
endmodule
