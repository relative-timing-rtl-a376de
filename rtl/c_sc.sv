`timescale 1ps/1ps
// c_sc: static C-element built from three AND gates and an OR gate (SC).
//
// The output is the majority of a, b and z itself: z = ab | bz | az. When a
// and b agree the output follows them; when they differ the two feedback
// terms hold the previous value. The internal node names ab, bz and az
// follow the source drawing. The circuit is only safe if the environment is
// slow: a fast response to z could withdraw an input before az or bz has
// risen. That race does not appear here because the gates have zero delay.
//
// Interface: a, b in; z out. The combinational loop through bz and az is
// the storage of the element and is intended; lint tools report it as a
// loop. Self-initialising with both inputs low.
module c_sc (
  input  logic a,
  input  logic b,
  output logic z
);

  logic ab, bz, az;

  assign ab = a & b;
  assign bz = b & z;
  assign az = a & z;
  assign z  = ab | bz | az;

endmodule
