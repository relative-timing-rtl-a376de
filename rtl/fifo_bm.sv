`timescale 1ps/1ps
// fifo_bm: burst-mode FIFO cell, written as its asynchronous state machine.
//
// Same two four-phase handshakes as the speed-independent cell (li/lo on the
// left, ro/ri on the right), but the environment is assumed slower than the
// cell: lo+ before ri+ and ro+ before li-. The outputs of a burst are then
// produced together, and the cell is a burst-mode machine with six states:
//   0 -> 1  li+        / lo+ ro+
//   1 -> 2  li-        / lo-
//   1 -> 3  ri+        / ro-
//   2 -> 4  ri+        / ro-
//   3 -> 5  li-        / lo-
//   4 -> 1  ri- li+    / lo+ ro+
//   5 -> 1  ri- li+    / lo+ ro+
// A burst of two edges fires only once both edges have arrived. The state
// graph and its state numbers follow the source. The state is held in a
// latch that is open whenever the current state's input burst is complete;
// outputs are decoded from the state (lo high in 1 and 3, ro high in 1 and
// 2), so each output burst appears with the state change.
//
// Interface: rst (asynchronous, active high, state 0), li, ri in; lo, ro
// out. Zero delay. The state latch reads its own value; that feedback is
// the machine's state and is intended.
//
// Assertions check the environment's four-phase rules in simulation.
module fifo_bm
  import rt_pkg::*;
(
  input  logic rst,
  input  logic li,
  output logic lo,
  output logic ro,
  input  logic ri
);

  bm_state_e state;

  always_latch begin
    if (rst) begin
      state = BM_S0;
    end else begin
      unique case (state)
        BM_S0:        if (li)        state = BM_S1;
        BM_S1:        if (!li)       state = BM_S2;
                      else if (ri)   state = BM_S3;
        BM_S2:        if (ri)        state = BM_S4;
        BM_S3:        if (!li)       state = BM_S5;
        BM_S4, BM_S5: if (!ri && li) state = BM_S1;
        default:                     state = BM_S0;
      endcase
    end
  end

  assign lo = (state == BM_S1) || (state == BM_S3);
  assign ro = (state == BM_S1) || (state == BM_S2);

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
