`timescale 1ps/1ps
// c_sic_rt_rise: static C-element for an environment where a rises before b.
//
// With the assumption a-rise before b-rise, z can rise on b alone, and must
// fall only when both inputs are low: z = b | (a & z). It is the other half
// of the speed-independent complex gate.
//
// Interface: a, b in; z out. Zero delay. The loop through z is the storage
// and is intended. Self-initialising with both inputs low.
//
// An assertion checks the relative-timing assumption in simulation.
module c_sic_rt_rise (
  input  logic a,
  input  logic b,
  output logic z
);

  assign z = b | (a & z);

  // Relative-timing assumption: a is already high when b rises.
  always @(posedge b) begin
    assert (a) else $error("c_sic_rt_rise: b rose while a was still low");
  end

endmodule
