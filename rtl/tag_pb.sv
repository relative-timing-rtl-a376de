`timescale 1ps/1ps
// tag_pb: passive four-phase synchroniser of the speed-independent tag unit.
//
// PB = sr+ . sa+ . (sr- . sa- | r+ . a+) . r- . a- . PB
// The idle process offers a synchronisation request sr at once. When the
// common acknowledge sa arrives it withdraws sr and starts a four-phase
// handshake on its own output request r; r falls only after both the
// environment's acknowledge a has risen and sa has fallen. sr is offered
// again after the handshake has returned to zero.
// Equations (this design's derivation from the specification above):
//   r  = C(sa, ~a)            set by sa & ~a, reset by ~sa & a
//   sr = ~sa & ~r & ~a
//
// Interface: rst (asynchronous, active high, r = 0); r out, a in
// (environment side); sr out, sa in (synchroniser side). Zero delay. The
// r latch is a C-element whose reset state is not implied by idle inputs,
// hence the reset port.
//
// Assertions check the four-phase rules of the environment in simulation.
module tag_pb (
  input  logic rst,
  output logic r,
  input  logic a,
  output logic sr,
  input  logic sa
);

  always_latch begin
    if (rst)            r = 1'b0;
    else if (sa && !a)  r = 1'b1;
    else if (!sa && a)  r = 1'b0;
  end

  assign sr = ~sa & ~r & ~a;


  // Four-phase rules on the environment side: a changes only after r has
  // moved. r can answer in zero time, so the checks read a copy of r that
  // lags by 1 ps.
  logic r_seen;
  assign #1 r_seen = r;
  always @(posedge a) if (!rst) assert (r_seen)  else $error("%m: a rose before r rose");
  always @(negedge a) if (!rst) assert (!r_seen) else $error("%m: a fell while r was high");

endmodule
