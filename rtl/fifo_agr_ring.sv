`timescale 1ps/1ps
// fifo_agr_ring: a ring of aggressive relative-timed FIFO cells carrying one
// token.
//
// The aggressive cell is only correct in a ring that is large compared with
// its delays: the token must find every cell idle, i.e. the right handshake
// of a cell (ri falling) must be over before the token comes round to its
// left input again. This module closes RING_SIZE cells into such a ring.
// Each cell's ro reaches the next cell's li through a delay of HOP_PS,
// which stands for the forward delay of the cell and its wire (the gates
// themselves are zero-delay); each cell's lo is the previous cell's ri. A
// pulse on inject is ORed into the first cell's li to put the token in;
// after that the token circulates for ever with a period of RING_SIZE *
// HOP_PS. With zero-delay gates and LO_DELAY_PS = D, a cell's ri falls
// 2 * HOP_PS + 2 * D after its ro rose, so the ring assumption holds when
// RING_SIZE * HOP_PS > 2 * HOP_PS + 2 * D; every cell asserts it on each
// arrival. The ring with one token follows the source; the hop delay, the
// ring size and the inject input are this design's choices.
//
// Interface: rst (asynchronous, active high; held for HOP_PS + LO_DELAY_PS
// it empties the ring, and a token must then be injected again), inject in
// (one pulse, at most HOP_PS + LO_DELAY_PS wide, while the ring is empty);
// stage_ro out, the ro of every cell (bit 0 first). The loop round the ring is the ring itself and is
// intended; it passes through HOP_PS delays, which synthesis drops.
module fifo_agr_ring #(
  parameter int unsigned RING_SIZE   = 8,
  parameter int unsigned HOP_PS      = rt_pkg::DEFAULT_DELAY_PS,
  parameter int unsigned LO_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic                 rst,
  input  logic                 inject,
  output logic [RING_SIZE-1:0] stage_ro
);

  logic [RING_SIZE-1:0] li, lo, ro, ro_hop;

  for (genvar i = 0; i < RING_SIZE; i++) begin : g_cell
    // forward delay of cell i and its wire to cell i+1
    delay_line #(.DELAY_PS(HOP_PS), .INVERT(1'b0)) u_hop (
      .a(ro[i]),
      .y(ro_hop[i])
    );

    fifo_rt_agr #(.LO_DELAY_PS(LO_DELAY_PS)) u_cell (
      .rst(rst),
      .li (li[i]),
      .lo (lo[i]),
      .ro (ro[i]),
      .ri (lo[(i + 1) % RING_SIZE])
    );

    if (i == 0) begin : g_first
      assign li[i] = ro_hop[RING_SIZE-1] | inject;
    end else begin : g_next
      assign li[i] = ro_hop[i-1];
    end
  end

  assign stage_ro = ro;

endmodule
