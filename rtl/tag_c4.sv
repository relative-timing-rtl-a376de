`timescale 1ps/1ps
// tag_c4: four-way synchronisation by a tree of C-elements.
//
// C4 = (go0 | go1 | go2 | go3) . sa . C4
// sa rises once all four go requests are high and falls once all four are
// low. Built as the source draws it: C(go0, go1) and C(go2, go3) feed a third
// C-element.
//
// Interface: go[3:0] in, sa out. Zero delay; self-initialising when all go
// inputs start low.
module tag_c4 (
  input  logic [3:0] go,
  output logic       sa
);

  logic s01, s23;

  c_gc u_c01 (.a(go[0]), .b(go[1]), .z(s01));
  c_gc u_c23 (.a(go[2]), .b(go[3]), .z(s23));
  c_gc u_cat (.a(s01),   .b(s23),   .z(sa));

endmodule
