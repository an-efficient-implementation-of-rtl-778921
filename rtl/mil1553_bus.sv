// mil1553_bus: the shared data bus joining the bus controller and the remote terminals.
//
// On the real bus every terminal couples onto one twisted shielded pair and only one of them
// transmits at a time. In logic that bus is the OR of all terminals' two-line outputs
// (positive and negative level, see mil1553_pkg::bus_t), fed back to every receiver. The
// block also flags a collision: two drivers active in the same cycle, or both lines high.
// Since the command/response protocol lets only one terminal speak at a time, a collision is
// a protocol fault (or an outside disturbance) and is brought out on `collision`. The wiring as a logic OR and
// the collision flag are this design's own; the paper only shows the bus as a shared line.
//
// Timing: combinational, no delay.
module mil1553_bus
  import mil1553_pkg::*;
#(
  parameter int unsigned NUM_DRIVERS = 5
) (
  input  bus_t drv [NUM_DRIVERS],
  output bus_t bus,
  output logic collision
);

  always_comb begin
    int unsigned active;
    bus    = BUS_IDLE;
    active = 0;
    for (int i = 0; i < NUM_DRIVERS; i++) begin
      bus.pos = bus.pos | drv[i].pos;
      bus.neg = bus.neg | drv[i].neg;
      if (drv[i].pos || drv[i].neg) active++;
    end
    collision = (active > 1) || (bus.pos && bus.neg);
  end

endmodule
