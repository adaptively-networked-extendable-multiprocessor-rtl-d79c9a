// ndma_net_layer: the network layer of one node, a four-bus router that moves
// messages across a 2-D mesh of nodes as a wave.
//
// Each side (north, east, south, west) has an incoming and an outgoing 32-bit
// bus carrying ndma_pkg::msg_t; destination 0x00 means the bus is idle. The
// message passing rule:
//   * a node that sends puts the message out on all four buses;
//   * a message travelling east or west is passed on in the same direction and
//     also branched north and south; a message travelling north or south is
//     passed on only in the same direction; at the edge of the mesh it is lost.
//     This sweeps the mesh like a wave crest and reaches every node once;
//   * a message addressed to this node is delivered to the core and not passed
//     on (the hole behind the receiver); a broadcast (0xFF) is delivered and
//     passed on; the age field counts hops and a message is dropped at age 15.
// Each outgoing bus is an ndma_reg_thru: passing costs one cycle through the
// output register, or none once the bus has adapted to cut-through.
// Several messages wanting one bus in one cycle is a collision: the straight
// message wins over a branch, a branch from the west input over one from the
// east input, and forwarded traffic over the node's own send; the losers are
// dropped and collision pulses (the architecture has no message queue).
// Forwarded messages may follow each other on consecutive cycles.
// Sending: tx_valid with destination and byte; tx_ready is high when all four
// output registers are empty and no forwarded traffic needs them, and the send
// then takes effect on that rising edge; a node's own messages never follow
// each other on consecutive cycles. Receiving: rx_valid/rx_data are
// combinational from the incoming buses. Wave rule, fields, broadcast handling
// and register-thru follow the architecture; the priorities, the age limit and
// the single clock (instead of self-timing) are this implementation's choices.
// A broadcast reaching the node clears the threshold counters of all four
// buses, not only the one it travels along: the wave rule never sends a
// broadcast westward or back toward its source, so per-bus clearing could never
// reset a bus cut by traffic flowing toward the broadcaster.
module ndma_net_layer
  import ndma_pkg::*;
#(
  parameter int unsigned THRESH = 8,
  parameter bit          ADAPT  = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  my_id,
  input  msg_t        in_bus  [4],   // indexed by side (dir_e)
  output msg_t        out_bus [4],
  input  logic        tx_valid,
  input  logic [7:0]  tx_dest,
  input  logic [7:0]  tx_data,
  output logic        tx_ready,
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  output logic [7:0]  rx_orig,
  output logic        collision,
  output logic [3:0]  thru
);
  localparam int unsigned CW = $clog2(THRESH+1);

  logic [3:0] valid, for_me, bcast, fwd, deliver;
  logic [3:0] load, ready, lost, ev_pass, ev_recv, ev_bcast;
  msg_t       d [4];
  logic [3:0] drop;
  logic [3:0] cand_any;
  logic [CW-1:0] count [4];

  // classify incoming messages
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      valid[s]   = (in_bus[s].dest != ID_NULL);
      for_me[s]  = valid[s] && my_id != ID_NULL && in_bus[s].dest == my_id;
      bcast[s]   = valid[s] && in_bus[s].dest == ID_BCAST;
      deliver[s] = for_me[s] || bcast[s];
      fwd[s]     = valid[s] && !for_me[s] && in_bus[s].age != 4'hF;
    end
  end

  // forwarded copy of the message arriving on side s, leaving on side o
  function automatic msg_t fwd_msg(msg_t m, int o);
    msg_t r;
    r          = m;
    r.age      = m.age + 4'd1;
    r.last_dir = dir_e'(o);
    return r;
  endfunction

  // choose what each output register loads
  always_comb begin
    msg_t loc;
    loc      = '0;
    tx_ready = 1'b1;
    for (int o = 0; o < 4; o++) begin
      int st;
      st          = o ^ 2;                 // side the straight message enters on
      load[o]     = 1'b0;
      d[o]        = '0;
      drop[o]     = 1'b0;
      cand_any[o] = 1'b0;
      // straight through (registered unless the bus is cut through)
      if (fwd[st] && !thru[o]) begin
        load[o] = 1'b1; d[o] = fwd_msg(in_bus[st], o); cand_any[o] = 1'b1;
      end
      // branches of east/west travelling messages onto north and south
      if (o == int'(DIR_N) || o == int'(DIR_S)) begin
        if (fwd[DIR_W]) begin
          if (load[o]) drop[o] = 1'b1;
          else begin load[o] = 1'b1; d[o] = fwd_msg(in_bus[DIR_W], o); end
          cand_any[o] = 1'b1;
        end
        if (fwd[DIR_E]) begin
          if (load[o]) drop[o] = 1'b1;
          else begin load[o] = 1'b1; d[o] = fwd_msg(in_bus[DIR_E], o); end
          cand_any[o] = 1'b1;
        end
      end
      if (cand_any[o] || !ready[o]) tx_ready = 1'b0;
    end
    // the node's own message goes out on all four buses
    if (tx_valid && tx_ready) begin
      for (int o = 0; o < 4; o++) begin
        loc          = '0;
        loc.dest     = tx_dest;
        loc.data     = tx_data;
        loc.orig     = my_id;
        loc.orig_dir = dir_e'(o);
        loc.last_dir = dir_e'(o);
        load[o]      = 1'b1;
        d[o]         = loc;
      end
    end
  end

  // counter events: a bus counts what arrives on the opposite side
  always_comb begin
    for (int o = 0; o < 4; o++) begin
      ev_pass[o]  = valid[o ^ 2] && !for_me[o ^ 2] && !bcast[o ^ 2];
      ev_recv[o]  = for_me[o ^ 2];
      ev_bcast[o] = |bcast;
    end
  end

  for (genvar o = 0; o < 4; o++) begin : g_bus
    ndma_reg_thru #(.THRESH(THRESH), .ADAPT(ADAPT)) u_bus (
      .clk, .rst,
      .load    (load[o]),
      .d       (d[o]),
      .wire_in (in_bus[o ^ 2]),
      .ev_pass (ev_pass[o]),
      .ev_recv (ev_recv[o]),
      .ev_bcast(ev_bcast[o]),
      .ready   (ready[o]),
      .thru    (thru[o]),
      .lost    (lost[o]),
      .out     (out_bus[o]),
      .count   (count[o])
    );
  end

  // delivery to the core: one message per cycle, lowest side index first
  always_comb begin
    rx_valid = 1'b0;
    rx_data  = '0;
    rx_orig  = '0;
    for (int s = 3; s >= 0; s--) begin
      if (deliver[s]) begin
        rx_valid = 1'b1;
        rx_data  = in_bus[s].data;
        rx_orig  = in_bus[s].orig;
      end
    end
  end

  assign collision = (|drop) || (|lost) || ($countones(deliver) > 1);
endmodule
