`timescale 1ps/1ps
// domino_gate: a set-reset flop mapped onto a domino gate with a keeper.
//
// Asynchronous controllers are often synthesised as set-reset flops with a
// set function f_s and a reset function f_r. Mapping them to domino gates
// restricts the reset function to a single variable x: the precharge
// transistor resets the output when x is low (f_r = ~x), and the nMOS stack
// evaluates the set function.
//   FOOTED = 1: f_s = x & a & (b | c)  (x also gates the evaluation stack)
//   FOOTED = 0: f_s = a & (b | c)      (no foot; the environment keeps x high
//                                       whenever the set function is true)
// The keeper holds z when neither function is active, which is modelled as a
// latch. The two set functions, the single-variable reset and the footed and
// unfooted forms follow the source; the priority of set over reset when an
// unfooted gate sees both is this model's choice (a real gate would fight).
//
// Interface: x, a, b, c in; z out. Zero delay; z responds as soon as a
// function becomes true. The feedback through the keeper is intended and is
// what makes the gate state-holding; inside a controller whose inputs come
// back from its own output, lint reports that path as a combinational loop,
// which is likewise intended. When a caller ties inputs to constants
// lint may report that no latch is inferred; the hold behaviour is the same.
module domino_gate #(
  parameter bit FOOTED = 1'b1
) (
  input  logic x,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic z
);

  logic f_s, f_r;

  assign f_s = (FOOTED ? x : 1'b1) & a & (b | c);
  assign f_r = ~x;

  always_latch begin
    if (f_s)      z = 1'b1;
    else if (f_r) z = 1'b0;
  end

endmodule
