`timescale 1ps/1ps
// fifo_pulse: pulse-mode FIFO cell.
//
// Once the backward acknowledge has been removed, a FIFO cell only has to
// turn an input pulse on li into an output pulse on ro. The cell is a
// footed domino gate that is set by li and precharged by y, where y is ro
// inverted and delayed: ro rises, y falls one inverter delay later and
// resets ro, and y rises again one delay after that. The output is a
// self-timed pulse of width Y_DELAY_PS. The structure (li, the gate, the
// feedback inverter y) follows the source; the delay value is this design's.
//
// Interface: li in (pulse), ro out (pulse). Timing rules for the input
// pulse, which the source derives from the four-phase handshake:
//   ro rises before li falls   (the pulse is long enough to set the gate)
//   li falls before y rises    (otherwise a second ro pulse is produced)
//   ro has fallen before the next li rises
// No reset port: from any start state the loop settles within two delays.
// The loop ro -> y -> ro is the self-reset of the pulse and is intended.
//
// An assertion checks the second pulse rule in simulation.
module fifo_pulse #(
  parameter int unsigned Y_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic li,
  output logic ro
);

  logic y;

  domino_gate #(.FOOTED(1'b1)) u_gate (
    .x(y),
    .a(li),
    .b(1'b1),
    .c(1'b0),
    .z(ro)
  );

  delay_line #(.DELAY_PS(Y_DELAY_PS), .INVERT(1'b1)) u_y_inv (
    .a(ro),
    .y(y)
  );


  // Input pulse rule: li has fallen before y recovers, otherwise the gate
  // fires a second time on the same input pulse.
  always @(posedge y) assert (!li) else $error("%m: li still high when y rose");

endmodule
