`timescale 1ps/1ps
// c_sic: speed-independent static C-element as one complex gate (SIC).
//
// z = a&b | z&(a|b): the output is set when both inputs are high, reset
// when both are low, and held otherwise through the feedback term. Written
// as a single complex gate it is hazard-free for any gate and wire delays.
// The two relative-timing versions (c_sic_rt_fall, c_sic_rt_rise) are each a
// part of this equation.
//
// Interface: a, b in; z out. Zero delay. The loop through z is the element's
// storage and is intended. Self-initialising with both inputs low.
module c_sic (
  input  logic a,
  input  logic b,
  output logic z
);

  assign z = (a & b) | (z & (a | b));

endmodule
