`timescale 1ps/1ps
// c_gc_rt_fall: domino C-element reduced by the assumption "a falls before b".
//
// If the environment guarantees that a always falls before b (relative-timing
// assumption a-fall before b-fall), the reset function of the C-element needs
// only ~b: by the time b falls, a is already low. The element becomes a
// footed domino gate with x = b: set a & b, reset ~b, one pull-up transistor
// fewer than the full gC. Behaviour in a legal environment:
// (a+ | b+) . z+ . a- . b- . z- .
//
// Interface: a, b in; z out. Zero delay. If the assumption is broken (b falls
// while a is high) z falls anyway; that is the intended reduction, not a
// fault. Self-initialising with b low.
//
// An assertion checks the relative-timing assumption in simulation.
module c_gc_rt_fall (
  input  logic a,
  input  logic b,
  output logic z
);

  domino_gate #(.FOOTED(1'b1)) u_gate (
    .x(b),
    .a(a),
    .b(1'b1),
    .c(1'b0),
    .z(z)
  );

  // Relative-timing assumption: a is already low when b falls.
  always @(negedge b) begin
    assert (!a) else $error("c_gc_rt_fall: b fell while a was still high");
  end

endmodule
