`timescale 1ps/1ps
// fifo_rt_shuffled: aggressive relative-timed FIFO cell with every wire
// pointing forward.
//
// In a chain of aggressive cells, a cell's lo is only its li delayed by a
// buffer, and it returns to the previous cell as that cell's ri. Moving
// that buffer across the cell boundary, once into each place where its
// output is used, changes nothing in the timing but removes all backward
// wiring: the precharge signal ri becomes a delayed copy of the cell's own
// ro, and the "lo low" input of the domino AND arrives from the previous
// cell as li_n, an inverted and delayed copy of li. The cell therefore
// sends two wires forward: ro, and ro_n (ro inverted and delayed), which is
// the next cell's li_n. A rising li meets li_n still high, the domino AND
// sets ro, and the local ri precharges it again LO_DELAY_PS later, so ro is
// a pulse of width LO_DELAY_PS. The cell boundary, the two forward wires
// and the domino AND follow the source; the delay value is this design's.
//
// Interface: rst (asynchronous, active high, clears ro), li and li_n in;
// ro and ro_n out. ro rises in zero time after li rises and falls
// LO_DELAY_PS later; ro_n is ro inverted and delayed by LO_DELAY_PS. Rule
// for the environment (the ring assumption, now without any acknowledge):
// when li rises, li_n is high and the local ri has fallen, i.e. the
// previous token has passed and the cell has recovered. An assertion checks
// this in simulation. Synthesis keeps only the logic of the two buffers;
// the loop ro -> ri -> ro is the self-reset of the pulse and is intended.
module fifo_rt_shuffled #(
  parameter int unsigned LO_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic rst,
  input  logic li,
  input  logic li_n,
  output logic ro,
  output logic ro_n
);

  logic ri;   // local copy of the next cell's lo, i.e. ro delayed

  delay_line #(.DELAY_PS(LO_DELAY_PS), .INVERT(1'b0)) u_ri_buf (
    .a(ro),
    .y(ri)
  );

  delay_line #(.DELAY_PS(LO_DELAY_PS), .INVERT(1'b1)) u_ro_n_inv (
    .a(ro),
    .y(ro_n)
  );

  // Footed domino AND: precharged while ri (or rst) is high, evaluates
  // li & li_n otherwise.
  domino_gate #(.FOOTED(1'b1)) u_ro_gate (
    .x(~(ri | rst)),
    .a(li),
    .b(li_n),
    .c(1'b0),
    .z(ro)
  );

  // Ring assumption: the previous token has passed and the cell recovered.
  always @(posedge li) if (!rst) begin
    assert (li_n) else $error("%m: li rose while li_n was low");
    assert (!ri)  else $error("%m: li rose before the cell recovered");
  end

endmodule
