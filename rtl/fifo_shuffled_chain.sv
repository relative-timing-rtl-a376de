`timescale 1ps/1ps
// fifo_shuffled_chain: a run of shuffled aggressive FIFO cells.
//
// STAGES cells of fifo_rt_shuffled in a row: each cell's ro and ro_n drive
// the next cell's li and li_n. There is no wire from right to left, so the
// right-hand environment no longer acknowledges anything: a token entering
// on li leaves every stage, the last one included, as a pulse of width
// LO_DELAY_PS. The first cell's li_n would come from the previous cell of a
// ring; here the chain makes it itself with one inverting delay of li, so
// that the chain is driven from one wire. That inverter, and the choice of
// three stages (the number the source draws), are this design's.
//
// Interface: rst, li in; ro, ro_n out (last stage); stage_ro, the ro of
// every stage (bit 0 first). Rule: li rises only after the previous token
// has passed the first stage and li has been low for LO_DELAY_PS.
module fifo_shuffled_chain #(
  parameter int unsigned STAGES      = 3,
  parameter int unsigned LO_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic              rst,
  input  logic              li,
  output logic              ro,
  output logic              ro_n,
  output logic [STAGES-1:0] stage_ro
);

  logic [STAGES:0] req;     // req[i] is the li of stage i
  logic [STAGES:0] req_n;   // req_n[i] is the li_n of stage i

  assign req[0] = li;

  delay_line #(.DELAY_PS(LO_DELAY_PS), .INVERT(1'b1)) u_li_n_inv (
    .a(li),
    .y(req_n[0])
  );

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    fifo_rt_shuffled #(.LO_DELAY_PS(LO_DELAY_PS)) u_cell (
      .rst (rst),
      .li  (req[i]),
      .li_n(req_n[i]),
      .ro  (req[i+1]),
      .ro_n(req_n[i+1])
    );
  end

  assign ro       = req[STAGES];
  assign ro_n     = req_n[STAGES];
  assign stage_ro = req[STAGES:1];

endmodule
