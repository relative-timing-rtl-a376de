`timescale 1ps/1ps
// fifo_si: speed-independent four-phase FIFO cell.
//
// The cell joins two four-phase handshakes: LEFT (request li in, acknowledge
// lo out) and RIGHT (request ro out, acknowledge ri in). The two handshakes
// synchronise once per cycle: when li has risen and the right channel is
// idle (ro and ri both low), lo and ro rise together. After that the two
// sides return to zero independently: lo falls when li falls, ro falls when
// ri rises. The next synchronisation needs a new li rise and ri low again.
//   LEFT  = li+ . sync . lo+ . li- . lo-
//   RIGHT = sync . ro+ . ri+ . ro- . ri-
// No timing assumption is made about the environment. The behaviour follows
// the source's Petri net; the source's gate netlist is not reproduced: lo
// and ro are written as set-reset functions held in one latch.
//
// Interface: rst (asynchronous, active high, forces lo = ro = 0), li, ri in;
// lo, ro out. Zero delay. The latch reads its own outputs in its set
// condition; that feedback is the state of the cell and is intended.
//
// Assertions check the environment's four-phase rules in simulation.
module fifo_si (
  input  logic rst,
  input  logic li,
  output logic lo,
  output logic ro,
  input  logic ri
);

  logic sync;   // both handshakes ready to synchronise

  assign sync = li & ~lo & ~ro & ~ri;

  always_latch begin
    if (rst) begin
      lo = 1'b0;
      ro = 1'b0;
    end else if (sync) begin
      lo = 1'b1;
      ro = 1'b1;
    end else begin
      if (!li) lo = 1'b0;
      if (ri)  ro = 1'b0;
    end
  end

  // Four-phase rules the environment must keep: li changes only after lo
  // has answered its previous edge, ri only after ro has. The cell answers
  // in zero time, so the checks read copies of lo and ro that lag by 1 ps:
  // at a request edge they still hold the values from before the answer.
  logic lo_seen, ro_seen;
  assign #1 lo_seen = lo;
  assign #1 ro_seen = ro;
  always @(posedge li) if (!rst) assert (!lo_seen) else $error("%m: li rose while lo was high");
  always @(negedge li) if (!rst) assert (lo_seen)  else $error("%m: li fell before lo rose");
  always @(posedge ri) if (!rst) assert (ro_seen)  else $error("%m: ri rose before ro rose");
  always @(negedge ri) if (!rst) assert (!ro_seen) else $error("%m: ri fell while ro was high");

endmodule
