`timescale 1ps/1ps
// c_gc: generalized C-element built as a domino gate (gC).
//
// The C-element waits for both inputs to agree: z rises once a and b are
// both high and falls once both are low; otherwise it holds. In the domino
// form the set function a & b drives the nMOS stack and the reset function
// ~a & ~b the pMOS stack; a keeper holds the node in between, modelled here
// as a latch. This element is also the two-input "C" used in the tag-unit
// synchronisers.
//
// Interface: a, b in; z out. Zero delay. The element initialises itself: with
// both inputs low the reset function is active, so no reset port is needed.
// The keeper latch holds z in the loop of a handshake; lint may report the
// enclosing handshake as a combinational loop, which is intended. A linter
// that sees set and reset as mutually exclusive may also say that no latch
// is inferred; the element still holds z when neither function is active.
module c_gc (
  input  logic a,
  input  logic b,
  output logic z
);

  logic f_s, f_r;

  assign f_s = a & b;
  assign f_r = ~a & ~b;

  always_latch begin
    if (f_s)      z = 1'b1;
    else if (f_r) z = 1'b0;
  end

endmodule
