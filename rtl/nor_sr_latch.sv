// nor_sr_latch: the cross-coupled latch at the front of the SR-latch arbiters.
//
// q_top = NOR(s1, q_bot) and q_bot = NOR(s2, q_top). While both inputs are
// high both outputs are held low. When the inputs fall, the first one to fall
// lets its own output rise, and that output then holds the other one low:
// s1 falling first gives q_top = 1, s2 falling first gives q_bot = 1. If both
// fall almost together, both outputs rise, force each other low again, and the
// pair oscillates at high frequency until the oscillation damps out. The
// arbiters after the latch detect that oscillation.
//
// The feedback between the two gates is a combinational loop by intent: it is
// the storage element of the latch, exactly as the arbiter is built on the
// FPGA, so a loop warning on this module is expected. A zero-delay simulator
// settles a perfectly simultaneous fall to one side instead of oscillating.
//
// No clock; q_top and q_bot follow the inputs after the gate delays.
module nor_sr_latch (
  input  logic s1,
  input  logic s2,
  output logic q_top,
  output logic q_bot
);
  assign q_top = ~(s1 | q_bot);
  assign q_bot = ~(s2 | q_top);
endmodule
