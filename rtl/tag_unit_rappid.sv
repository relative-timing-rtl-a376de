`timescale 1ps/1ps
// tag_unit_rappid: pulse-mode tag unit with relative-timing constraints.
//
// Same job as the speed-independent tag unit, with the backward acknowledges
// of the tag path removed: tags arrive and leave as pulses, and irdyack and
// bufreq are pulses too, while irdy and bufack stay four-phase levels.
//   ba       = ~bufack                (buffer slot free)
//   rdy      = irdy & ba              (instruction decoded and slot free)
//   taglocal = |ti                    (a tag pulse from any earlier byte)
//   tl       = taglocal inverted and delayed by TL_DELAY_PS
//   fire     = footed domino gate, precharged while rdy is low, set by
//              taglocal & tl while rdy is high
//   bufreq = irdyack = fire,  to[k] = fire & l[k]
// A tag pulse that meets rdy high sets the domino gate. The buffer answers
// the bufreq pulse by raising bufack, which drops rdy and precharges the
// gate, so all output pulses end together. The decoder lowers irdy only
// after the irdyack pulse has ended; irdy and bufack may then return low in
// either order. tl limits the window in which the tag pulse can set the
// gate to the first TL_DELAY_PS of the pulse. The node names, the rdy gate
// and the length steering follow the source; the exact set function of the
// domino gate is this design's reading.
//
// Timing rules (relative-timing constraints the environment must meet):
//   the tag pulse arrives while rdy is high, and ends before the output
//   pulses end; irdy falls only after irdyack has fallen; the outputs are
//   back low and tl is high again before the next tag pulse; rdy rises
//   again only after the tag pulse has ended. l must be one-hot and stable
//   while the unit fires. The unit itself would also end its outputs if
//   irdy fell first; the source's environment never does that.
//
// Interface: ti, l, irdy, bufack in; to, irdyack, bufreq out. Zero delay
// except tl. No reset: the gate is precharged whenever irdy is low.
//
// Assertions check the constraints on the tag pulse, irdy and l in
// simulation.
module tag_unit_rappid #(
  parameter int unsigned N_LEN       = rt_pkg::N_LEN,
  parameter int unsigned TL_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic [N_LEN-1:0] ti,
  input  logic [N_LEN-1:0] l,
  output logic [N_LEN-1:0] to,
  input  logic             irdy,
  output logic             irdyack,
  output logic             bufreq,
  input  logic             bufack
);

  logic ba, rdy, taglocal, tl, fire;

  assign ba       = ~bufack;
  assign rdy      = irdy & ba;
  assign taglocal = |ti;

  delay_line #(.DELAY_PS(TL_DELAY_PS), .INVERT(1'b1)) u_tl_inv (
    .a(taglocal),
    .y(tl)
  );

  domino_gate #(.FOOTED(1'b1)) u_fire (
    .x(rdy),
    .a(taglocal),
    .b(tl),
    .c(1'b0),
    .z(fire)
  );

  assign bufreq  = fire;
  assign irdyack = fire;
  assign to      = {N_LEN{fire}} & l;


  // Relative-timing constraints on the tag pulse: it meets rdy high, and the
  // previous pulse has been absorbed (tl high again) before it starts.
  always @(posedge taglocal) begin
    assert (rdy) else $error("%m: tag pulse arrived while rdy was low");
    assert (tl)  else $error("%m: tag pulse arrived before tl recovered");
  end
  // rdy rises again only after the tag pulse has ended, so that one tag
  // cannot fire the unit twice.
  always @(posedge rdy) assert (!taglocal) else $error("%m: rdy rose while a tag pulse was present");
  // The tag pulse has ended before the output pulses end.
  always @(negedge fire) assert (!taglocal) else $error("%m: outputs ended while the tag pulse was still high");
  // irdy falls only after the irdyack pulse has ended. irdyack can follow
  // irdy in zero time, so the check reads a copy that lags by 1 ps.
  logic fire_seen;
  assign #1 fire_seen = fire;
  always @(negedge irdy) assert (!fire_seen) else $error("%m: irdy fell before irdyack ended");
  // l is one-hot (one instruction length) whenever the unit fires.
  always @(posedge fire) assert (l != '0 && (l & (l - 1'b1)) == '0) else $error("%m: l not one-hot when the unit fired");

endmodule
