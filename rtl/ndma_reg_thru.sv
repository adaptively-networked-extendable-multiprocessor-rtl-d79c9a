// ndma_reg_thru: one outgoing bus of the network layer with its register-thru
// switch and adaptive threshold counter.
//
// The bus normally carries the output register, loaded by the network layer
// with the message to send this way: a message passes the node with one cycle
// of delay. The bus also owns a threshold counter, zero after reset. Each
// message that passes straight through the node along this bus counts it up
// (no further once it has reached THRESH); each message on this bus that is
// addressed to this node counts it down; a broadcast clears it. Once the
// counter equals THRESH the bus is "cut through": the incoming bus of the
// opposite side is wired straight to this output, so a message crosses the node
// in the same cycle, while the node still sees it and can receive it. The path
// has evolved from packet switching to a circuit.
//
// The output register holds a forwarded message for one cycle and takes a new
// one every cycle if needed. ready (register empty) tells the network layer
// when the node's own message may be loaded, so the node never puts two of its
// own messages on the bus back to back. The switch to the wire
// takes effect only in a cycle where the register is empty and the incoming
// bus idle, and lags the counter by one cycle: switching in the middle of a
// stream would otherwise shorten one message's delay by a cycle and push two
// messages into the same cycle further on. If the node's own message sits in
// the register while the wire carries a message, the wire wins and lost pulses.
// Counter, threshold comparison and 2:1 register/wire mux follow the
// architecture. This implementation's choices: the threshold (8), the idle
// condition for switching, and that the register still drives the bus while
// the wire carries nothing, so the node can still send and branch messages on
// a cut bus.
module ndma_reg_thru
  import ndma_pkg::*;
#(
  parameter int unsigned THRESH = 8,
  parameter bit          ADAPT  = 1'b1   // 0 disables the cut-through
) (
  input  logic clk,
  input  logic rst,
  input  logic load,       // load d into the output register
  input  msg_t d,
  input  msg_t wire_in,    // incoming bus of the opposite side
  input  logic ev_pass,    // a message passed straight through along this bus
  input  logic ev_recv,    // a message on this bus was addressed to this node
  input  logic ev_bcast,   // a broadcast arrived on this bus
  output logic ready,
  output logic thru,
  output logic lost,
  output msg_t out,
  output logic [$clog2(THRESH+1)-1:0] count
);
  msg_t q;
  localparam int unsigned CW = $clog2(THRESH+1);

  logic wire_busy;
  assign ready     = (q.dest == ID_NULL);
  assign wire_busy = (wire_in.dest != ID_NULL);
  assign out       = (thru && wire_busy) ? wire_in : q;
  assign lost      = thru && wire_busy && !ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= '0;
      count <= '0;
      thru  <= 1'b0;
    end else begin
      q    <= load ? d : '0;
      thru <= ADAPT && (count == CW'(THRESH)) && (thru || (ready && !wire_busy));
      if (ev_bcast)                                  count <= '0;
      else if (ev_recv && count != '0)               count <= count - 1'b1;
      else if (ev_pass && count != CW'(THRESH))      count <= count + 1'b1;
    end
  end
endmodule
