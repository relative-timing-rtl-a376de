`timescale 1ps/1ps
// rt_top: the relative-timing example circuits side by side.
//
// The circuits form three families that do not connect to one another, so
// each keeps its own ports:
//   * two domino gates (footed and unfooted) on shared inputs;
//   * eight C-element circuits on shared inputs c_a, c_b, one output bit
//     each in c_z: domino gC and its two relative-timing reductions, the
//     static majority gate, its locally timed version, the speed-independent
//     complex gate and its two relative-timing reductions. The reduced ones
//     are only correct when the inputs obey their ordering assumption;
//   * five FIFO controllers: the speed-independent cell, the burst-mode
//     cell, a three-stage chain of aggressive relative-timed cells, the
//     same chain with its buffers moved so that every wire points forward
//     (shuffled cells), and a three-stage chain of pulse-mode cells;
//   * a closed ring of eight aggressive cells carrying one token;
//   * the speed-independent tag unit and the pulse-mode tag unit, each with
//     seven tag lines.
// The 4 x 16 torus that connects tag units in the decoder is not built
// here: its wiring is not specified; the tag units' ports are brought out
// instead.
//
// Interface: rst (asynchronous, active high) resets the controllers that
// need it; all other ports belong to one family as named by their prefix.
// All circuits are unclocked; timing is set by the delay parameters of the
// instances (DELAY_PS, in picoseconds).
module rt_top
  import rt_pkg::*;
#(
  parameter int unsigned DELAY_PS = DEFAULT_DELAY_PS,
  parameter int unsigned STAGES   = 3,
  parameter int unsigned RING     = 8,
  parameter int unsigned N        = N_LEN
) (
  input  logic              rst,
  // domino gates
  input  logic              dom_x,
  input  logic              dom_a,
  input  logic              dom_b,
  input  logic              dom_c,
  output logic              dom_z_footed,
  output logic              dom_z_unfooted,
  // C-elements
  input  logic              c_a,
  input  logic              c_b,
  output c_elem_out_t       c_z,
  // speed-independent FIFO cell
  input  logic              si_li,
  output logic              si_lo,
  output logic              si_ro,
  input  logic              si_ri,
  // burst-mode FIFO cell
  input  logic              bm_li,
  output logic              bm_lo,
  output logic              bm_ro,
  input  logic              bm_ri,
  // chain of aggressive relative-timed FIFO cells
  input  logic              agr_li,
  output logic              agr_lo,
  output logic              agr_ro,
  input  logic              agr_ri,
  output logic [STAGES-1:0] agr_stage_ro,
  // chain of shuffled aggressive FIFO cells (forward wires only)
  input  logic              shf_li,
  output logic              shf_ro,
  output logic              shf_ro_n,
  output logic [STAGES-1:0] shf_stage_ro,
  // ring of aggressive FIFO cells with one token
  input  logic              ring_inject,
  output logic [RING-1:0]   ring_ro,
  // chain of pulse-mode FIFO cells
  input  logic              pls_li,
  output logic              pls_ro,
  output logic [STAGES-1:0] pls_stage_ro,
  // speed-independent tag unit
  input  logic [N-1:0]      tsi_ti,
  output logic [N-1:0]      tsi_tia,
  input  logic [N-1:0]      tsi_l,
  output logic [N-1:0]      tsi_to,
  input  logic [N-1:0]      tsi_toa,
  input  logic              tsi_irdy,
  output logic              tsi_irdyack,
  output logic              tsi_bufreq,
  input  logic              tsi_bufack,
  // pulse-mode tag unit
  input  logic [N-1:0]      trp_ti,
  input  logic [N-1:0]      trp_l,
  output logic [N-1:0]      trp_to,
  input  logic              trp_irdy,
  output logic              trp_irdyack,
  output logic              trp_bufreq,
  input  logic              trp_bufack
);

  // ---- domino gates -------------------------------------------------------
  domino_gate #(.FOOTED(1'b1)) u_dom_footed (
    .x(dom_x), .a(dom_a), .b(dom_b), .c(dom_c), .z(dom_z_footed)
  );
  domino_gate #(.FOOTED(1'b0)) u_dom_unfooted (
    .x(dom_x), .a(dom_a), .b(dom_b), .c(dom_c), .z(dom_z_unfooted)
  );

  // ---- C-elements ---------------------------------------------------------
  logic gc_rt_rise_n;

  c_gc          u_gc          (.a(c_a), .b(c_b), .z(c_z.gc));
  c_gc_rt_fall  u_gc_rt_fall  (.a(c_a), .b(c_b), .z(c_z.gc_rt_fall));
  c_gc_rt_rise  u_gc_rt_rise  (.a_n(~c_a), .b_n(~c_b), .z_n(gc_rt_rise_n));
  c_sc          u_sc          (.a(c_a), .b(c_b), .z(c_z.sc));
  c_sc_lt #(.BUF_PS(DELAY_PS)) u_sc_lt (.a(c_a), .b(c_b), .z(c_z.sc_lt));
  c_sic         u_sic         (.a(c_a), .b(c_b), .z(c_z.sic));
  c_sic_rt_fall u_sic_rt_fall (.a(c_a), .b(c_b), .z(c_z.sic_rt_fall));
  c_sic_rt_rise u_sic_rt_rise (.a(c_a), .b(c_b), .z(c_z.sic_rt_rise));

  assign c_z.gc_rt_rise = ~gc_rt_rise_n;

  // ---- FIFO controllers ---------------------------------------------------
  fifo_si u_fifo_si (.rst(rst), .li(si_li), .lo(si_lo), .ro(si_ro), .ri(si_ri));
  fifo_bm u_fifo_bm (.rst(rst), .li(bm_li), .lo(bm_lo), .ro(bm_ro), .ri(bm_ri));

  fifo_agr_chain #(.STAGES(STAGES), .LO_DELAY_PS(DELAY_PS)) u_agr (
    .rst(rst), .li(agr_li), .lo(agr_lo), .ro(agr_ro), .ri(agr_ri),
    .stage_ro(agr_stage_ro)
  );

  fifo_shuffled_chain #(.STAGES(STAGES), .LO_DELAY_PS(DELAY_PS)) u_shf (
    .rst(rst), .li(shf_li), .ro(shf_ro), .ro_n(shf_ro_n), .stage_ro(shf_stage_ro)
  );

  fifo_agr_ring #(.RING_SIZE(RING), .HOP_PS(DELAY_PS), .LO_DELAY_PS(DELAY_PS)) u_ring (
    .rst(rst), .inject(ring_inject), .stage_ro(ring_ro)
  );

  fifo_pulse_chain #(.STAGES(STAGES), .Y_DELAY_PS(DELAY_PS)) u_pls (
    .li(pls_li), .ro(pls_ro), .stage_ro(pls_stage_ro)
  );

  // ---- tag units ----------------------------------------------------------
  tag_unit_si #(.N_LEN(N)) u_tag_si (
    .rst(rst), .ti(tsi_ti), .tia(tsi_tia), .l(tsi_l), .to(tsi_to),
    .toa(tsi_toa), .irdy(tsi_irdy), .irdyack(tsi_irdyack),
    .bufreq(tsi_bufreq), .bufack(tsi_bufack)
  );

  tag_unit_rappid #(.N_LEN(N), .TL_DELAY_PS(DELAY_PS)) u_tag_rp (
    .ti(trp_ti), .l(trp_l), .to(trp_to), .irdy(trp_irdy),
    .irdyack(trp_irdyack), .bufreq(trp_bufreq), .bufack(trp_bufack)
  );

endmodule
