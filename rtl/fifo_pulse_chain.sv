`timescale 1ps/1ps
// fifo_pulse_chain: a run of pulse-mode FIFO cells.
//
// STAGES fifo_pulse cells in series, each cell's ro pulse being the next
// cell's li pulse. There are no backward signals at all: ordering between
// successive tokens is guaranteed only by timing (a cell's output pulse has
// ended before the next input pulse arrives). Three stages is the number the
// source draws.
//
// Interface: li in (pulse); ro out (pulse of width Y_DELAY_PS); stage_ro is
// the ro of every stage, bit 0 first. With zero-delay gates a pulse reaches
// all stages at once; in silicon each stage adds its gate delay. Each
// cell's self-reset loop runs through its inverter delay and is intended.
module fifo_pulse_chain #(
  parameter int unsigned STAGES     = 3,
  parameter int unsigned Y_DELAY_PS = rt_pkg::DEFAULT_DELAY_PS
) (
  input  logic              li,
  output logic              ro,
  output logic [STAGES-1:0] stage_ro
);

  logic [STAGES:0] p;

  assign p[0] = li;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    fifo_pulse #(.Y_DELAY_PS(Y_DELAY_PS)) u_cell (
      .li(p[i]),
      .ro(p[i+1])
    );
  end

  assign ro       = p[STAGES];
  assign stage_ro = p[STAGES:1];

endmodule
