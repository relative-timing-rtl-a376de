`timescale 1ps/1ps
// c_sic_rt_fall: static C-element for an environment where a falls before b.
//
// With the assumption a-fall before b-fall (SIC-RT), z only has to fall when
// b falls, so z = b & (a | z): set needs a and b, reset needs only ~b. This is
// half of the speed-independent complex gate and about half its size.
//
// Interface: a, b in; z out. Zero delay. The loop through z is the storage
// and is intended. Self-initialising with b low.
//
// An assertion checks the relative-timing assumption in simulation.
module c_sic_rt_fall (
  input  logic a,
  input  logic b,
  output logic z
);

  assign z = b & (a | z);

  // Relative-timing assumption: a is already low when b falls.
  always @(negedge b) begin
    assert (!a) else $error("c_sic_rt_fall: b fell while a was still high");
  end

endmodule
