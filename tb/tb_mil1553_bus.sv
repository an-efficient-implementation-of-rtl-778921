// tb_mil1553_bus: the shared bus as a wired combination of terminal outputs.
//
// Every combination of idle, positive and negative outputs of three drivers is applied. The
// bus must show positive when some driver is positive, negative when some driver is
// negative, and the collision flag must be set exactly when more than one driver is active
// or a single driver shows both levels.
`timescale 1ns/1ps
module tb_mil1553_bus;
  import mil1553_pkg::*;

  localparam int D = 3;

  bus_t drv[D];
  bus_t bus;
  logic collision;
  int checks = 0, failures = 0;
  int n_coll = 0;

  mil1553_bus #(.NUM_DRIVERS(D)) dut (.drv(drv), .bus(bus), .collision(collision));

  initial begin
    for (int code = 0; code < 64; code++) begin
      int active;
      bit p, n;
      active = 0; p = 0; n = 0;
      for (int i = 0; i < D; i++) begin
        drv[i] = bus_t'(2'((code >> (2 * i)) & 3));
        if (drv[i] != BUS_IDLE) active++;
        p |= drv[i].pos;
        n |= drv[i].neg;
      end
      #1;
      checks++;
      if (bus.pos != p || bus.neg != n || collision != (active > 1 || (p && n))) begin
        failures++;
        $display("code %0d: bus %b collision %b", code, bus, collision);
      end
      n_coll += collision;
    end
    checks++;
    if (n_coll == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
