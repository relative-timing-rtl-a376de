`timescale 1ps/1ps
// c_gc_rt_rise: domino C-element reduced by the assumption "a rises before b".
//
// If a always rises before b, the set function of the C-element needs only b;
// the reset function stays "both inputs low". Mapped to a domino gate this
// works on inverted signals: the inputs arrive inverted (a_n, b_n) and the
// output is taken unbuffered from the dynamic node, which carries ~z. In
// inverted terms the single-variable function is z_n falling when b_n falls,
// and z_n rising when both a_n and b_n are high.
//
// Interface: a_n, b_n in (active-low a and b); z_n out (active-low z).
// Zero delay. Self-initialising with both inputs inactive (a_n = b_n = 1).
//
// An assertion checks the relative-timing assumption in simulation.
module c_gc_rt_rise (
  input  logic a_n,
  input  logic b_n,
  output logic z_n
);

  logic f_z, f_zn;    // f_z: z must rise, f_zn: z must fall

  assign f_z  = ~b_n;
  assign f_zn = a_n & b_n;

  always_latch begin
    if (f_z)       z_n = 1'b0;
    else if (f_zn) z_n = 1'b1;
  end

  // Relative-timing assumption: a is already high (a_n low) when b rises
  // (b_n falls).
  always @(negedge b_n) begin
    assert (!a_n) else $error("c_gc_rt_rise: b rose while a was still low");
  end

endmodule
