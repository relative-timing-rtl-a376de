`timescale 1ps/1ps
// fifo_rt_agr: aggressive relative-timed FIFO cell.
//
// Placed in a ring that is large compared with the cell delay, a token
// always finds the cell idle: the right handshake has finished (ri fell)
// before the next li rises. With that assumption the cell no longer waits
// for the right side. lo is just li passed through a buffer, and ro is a
// domino AND gate that is set by the rising edge of li (li high while the
// buffered lo is still low) and precharged (reset) by ri. The buffer delay
// must be long enough for the domino gate to be fully set before lo
// disables it. This structure follows the source; the buffer delay
// LO_DELAY_PS is this design's value.
//
// Interface: rst (asynchronous, active high, clears ro), li, ri in; lo, ro
// out. lo follows li after LO_DELAY_PS; ro rises in zero time after li
// rises and falls in zero time after ri rises. Environment rules: ri falls
// before the next li rises, and li stays high at least LO_DELAY_PS.
// Synthesis keeps only the logic of the lo buffer, so lo becomes a plain
// copy of li there; the delay exists in simulation and in the sized cell.
// When cells are chained, ro -> next cell -> its lo -> this ri forms a
// loop that lint reports as combinational; it is the handshake itself.
//
// An assertion checks the ring-size assumption in simulation.
module fifo_rt_agr #(
  parameter int unsigned LO_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic rst,
  input  logic li,
  output logic lo,
  output logic ro,
  input  logic ri
);

  delay_line #(.DELAY_PS(LO_DELAY_PS), .INVERT(1'b0)) u_lo_buf (
    .a(li),
    .y(lo)
  );

  // Footed domino AND: precharged while ri (or rst) is high, evaluates
  // li & ~lo otherwise.
  domino_gate #(.FOOTED(1'b1)) u_ro_gate (
    .x(~(ri | rst)),
    .a(li),
    .b(~lo),
    .c(1'b0),
    .z(ro)
  );


  // Relative-timing assumption: the right handshake has finished (ri low)
  // before the next token arrives on li.
  always @(posedge li) if (!rst) assert (!ri) else $error("%m: li rose while ri was still high");

endmodule
