`timescale 1ps/1ps
// tag_unit_si: speed-independent tag unit of a variable-length instruction
// decoder.
//
// A tag marks the byte where the next instruction starts. A tag unit sits at
// one byte position: it accepts the tag from whichever earlier position sent
// it (ti[k], k = 1..N_LEN bytes back), waits until the instruction at its own
// position is decoded (irdy) and an output buffer slot is free, and then
// passes the tag on to the position that is l bytes further (to[k] for the
// one-hot length l[k]) while handing the instruction to the buffer (bufreq).
// Every channel is a four-phase request/acknowledge handshake.
//
// Four processes are synchronised by one C-element tree (tag_c4):
//   IRDY   tag_pa  r = irdy,          a = irdyack, sr = go0
//   TAGIN  tag_pa  r = |ti,           a = tia,     sr = go1
//   BUFREQ tag_pb  r = bufreq,        a = bufack,  sr = go2
//   TAGOUT tag_pb  r = tag out,       a = |toa,    sr = go3
// The tag inputs are merged by an OR; each ti[k] is acknowledged by a
// C-element of ti[k] and the merged acknowledge. The tag output is steered
// to to[k] by the length line l[k], and the acknowledges are merged by an OR.
// Only one ti handshake may be active at a time, and l must be one-hot and
// stable while a tag is passed. The process structure and the steering
// follow the source; the equations inside the processes are this design's.
//
// Interface: rst (asynchronous, active high), then the handshake ports
// listed above. Zero delay. The loop sa -> synchronisers -> go -> C4 -> sa
// is the four-way handshake and is intended.
//
// An assertion checks that at most one tag input is active.
module tag_unit_si #(
  parameter int unsigned N_LEN = rt_pkg::N_LEN
) (
  input  logic             rst,
  input  logic [N_LEN-1:0] ti,
  output logic [N_LEN-1:0] tia,
  input  logic [N_LEN-1:0] l,
  output logic [N_LEN-1:0] to,
  input  logic [N_LEN-1:0] toa,
  input  logic             irdy,
  output logic             irdyack,
  output logic             bufreq,
  input  logic             bufack
);

  logic [3:0] go;
  logic       sa;
  logic       ti_any, tia_any;
  logic       to_any, toa_any;

  assign ti_any  = |ti;
  assign toa_any = |toa;

  tag_pa u_irdy  (.r(irdy),   .a(irdyack), .sr(go[0]), .sa(sa));
  tag_pa u_tagin (.r(ti_any), .a(tia_any), .sr(go[1]), .sa(sa));
  tag_pb u_bufrq (.rst(rst), .r(bufreq), .a(bufack),  .sr(go[2]), .sa(sa));
  tag_pb u_tagout(.rst(rst), .r(to_any), .a(toa_any), .sr(go[3]), .sa(sa));

  tag_c4 u_c4 (.go(go), .sa(sa));

  for (genvar k = 0; k < N_LEN; k++) begin : g_len
    c_gc u_tia (.a(ti[k]), .b(tia_any), .z(tia[k]));
    assign to[k] = to_any & l[k];
  end


  // Only one tag input handshake may be active at a time.
  always_comb assert ((ti & (ti - 1'b1)) == '0) else $error("%m: more than one ti active");

endmodule
