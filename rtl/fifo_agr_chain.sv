`timescale 1ps/1ps
// fifo_agr_chain: a run of aggressive relative-timed FIFO cells.
//
// STAGES cells of fifo_rt_agr are wired head to tail as a section of a
// token ring: each cell's ro drives the next cell's li, and each cell's lo
// (its delayed li) is the previous cell's ri. Because lo is only a delayed
// copy of li, a token entering on li ripples forward as a pulse of width
// LO_DELAY_PS on every internal ro and ends as a level on the last ro, which
// the right-hand environment acknowledges on ri. Three stages is the number
// the source draws.
//
// Interface: rst, li, ri in; lo, ro out, as for one cell, plus stage_ro, the
// ro of every stage (bit 0 first). The environment rule of each cell (ri
// falls before the next li rises) must hold for the chain's ends. The path
// ro -> next cell's lo -> ri closes a loop between neighbouring cells; it is
// the handshake and runs through the lo buffer delay, so it is intended.
module fifo_agr_chain #(
  parameter int unsigned STAGES      = 3,
  parameter int unsigned LO_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic              rst,
  input  logic              li,
  output logic              lo,
  output logic              ro,
  input  logic              ri,
  output logic [STAGES-1:0] stage_ro
);

  logic [STAGES:0] req;   // req[i] is the li of stage i, req[STAGES] = ro
  logic [STAGES:0] ack;   // ack[i] is the lo of stage i, ack[STAGES] = ri

  assign req[0]      = li;
  assign ack[STAGES] = ri;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    fifo_rt_agr #(.LO_DELAY_PS(LO_DELAY_PS)) u_cell (
      .rst(rst),
      .li (req[i]),
      .lo (ack[i]),
      .ro (req[i+1]),
      .ri (ack[i+1])
    );
  end

  assign lo       = ack[0];
  assign ro       = req[STAGES];
  assign stage_ro = req[STAGES:1];

endmodule
