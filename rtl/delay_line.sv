`timescale 1ps/1ps
// delay_line: behavioural model of a buffer or inverter whose delay matters.
//
// Relative-timing circuits rely on some paths being slower than others: the
// buffer on lo in the aggressive FIFO cell, the inverter that closes the loop
// of the pulse-mode FIFO cell, the inverter that forms tl in the pulse-mode
// tag unit, and the output buffer of the locally timed static C-element. This
// model stands in for those cells. It is a behavioural model, not synthesizable
// logic: in silicon it is a sized buffer or inverter chain, and synthesis
// keeps only its logic function (a wire or an inverter).
//
// Interface: y follows a (or ~a when INVERT is set) after DELAY_PS
// picoseconds. The delay is inertial, like a gate: an input pulse shorter
// than DELAY_PS does not reach the output. The delay value is this design's
// choice; the circuits only require it to exceed the delay of the gates
// it races against. Before the first input edge has passed through, y is
// whatever the simulator starts it at, so a circuit that uses the line holds
// reset for longer than DELAY_PS.
//
// Simulation note: drive a with changes at least 1 ps apart. A change made
// in the same time step as an earlier zero-delay wait can be lost by some
// simulators' scheduling of delayed continuous assignments.
module delay_line #(
  parameter int unsigned DELAY_PS = rt_pkg::DEFAULT_DELAY_PS,
  parameter bit          INVERT   = 1'b0
) (
  input  logic a,
  output logic y
);

  logic a_int;

  assign a_int = INVERT ? ~a : a;
  assign #(DELAY_PS) y = a_int;

endmodule
