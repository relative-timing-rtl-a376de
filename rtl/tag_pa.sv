`timescale 1ps/1ps
// tag_pa: active four-phase synchroniser of the speed-independent tag unit.
//
// PA = r+ . sr+ . sa+ . (sr- . sa- | a+ . r-) . a- . PA
// A request r from the environment is forwarded as a synchronisation
// request sr to the shared C-element tree; when the common acknowledge sa
// arrives, sr is withdrawn and the environment is acknowledged on a. The
// acknowledge a returns to zero only after both r and sa have.
// Equations (this design's derivation from the specification above):
//   a  = C(r, sa)             two-input C-element
//   sr = r & ~a & ~sa
//
// Interface: r in, a out (environment side); sr out, sa in (synchroniser
// side). Zero delay; self-initialising when r and sa start low.
//
// Assertions check the four-phase rules of the environment in simulation.
module tag_pa (
  input  logic r,
  output logic a,
  output logic sr,
  input  logic sa
);

  c_gc u_ack (
    .a(r),
    .b(sa),
    .z(a)
  );

  assign sr = r & ~a & ~sa;


  // Four-phase rules on the environment side: r changes only after a has
  // answered its previous edge. a can answer in zero time, so the checks
  // read a copy of a that lags by 1 ps.
  logic a_seen;
  assign #1 a_seen = a;
  always @(posedge r) assert (!a_seen) else $error("%m: r rose while a was high");
  always @(negedge r) assert (a_seen)  else $error("%m: r fell before a rose");

endmodule
