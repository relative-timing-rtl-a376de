`timescale 1ps/1ps
// c_sc_lt: locally timed static C-element (majority gate plus output buffer).
//
// Same majority function as the static C-element, but the feedback is taken
// from the internal node c and the output z is c passed through a buffer:
// c = ab | bc | ac, z = buffer(c). Because the AND gates and the buffer are
// all enabled by c, the races of the static element become local: they hold
// when the buffer is slower than the AND gates, independent of how quickly
// the environment answers z. The buffer and the node names ab, bc, ac, c
// follow the source; the buffer delay BUF_PS is this design's value.
//
// Interface: a, b in; z out, BUF_PS picoseconds after c. The loop through
// bc and ac is the element's storage and is intended. Self-initialising
// with both inputs low.
module c_sc_lt #(
  parameter int unsigned BUF_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic a,
  input  logic b,
  output logic z
);

  logic ab, bc, ac, c;

  assign ab = a & b;
  assign bc = b & c;
  assign ac = a & c;
  assign c  = ab | bc | ac;

  delay_line #(.DELAY_PS(BUF_PS), .INVERT(1'b0)) u_buf (
    .a(c),
    .y(z)
  );

endmodule
