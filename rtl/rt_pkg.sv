`timescale 1ps/1ps
// rt_pkg: constants and types shared by the relative-timing example circuits.
//
// The circuits are unclocked (asynchronous) controllers. All delays are in
// picoseconds. DEFAULT_DELAY_PS is the delay given to the buffers and
// inverters whose delay a relative-timing constraint relies on; it is a
// value of this design, not a measured one. N_LEN is the number of
// instruction lengths a tag unit steers between (tag lines 1..7).
package rt_pkg;

  localparam int unsigned DEFAULT_DELAY_PS = 100;
  localparam int unsigned N_LEN            = 7;

  // States of the burst-mode FIFO cell's asynchronous state machine.
  // Encoding follows the state numbers 0..5 of its state graph.
  typedef enum logic [2:0] {
    BM_S0 = 3'd0,   // initial, lo=0 ro=0
    BM_S1 = 3'd1,   // both outputs raised
    BM_S2 = 3'd2,   // left returned (lo=0), right still requesting
    BM_S3 = 3'd3,   // right acknowledged (ro=0), left still high
    BM_S4 = 3'd4,   // both low, reached via state 2
    BM_S5 = 3'd5    // both low, reached via state 3
  } bm_state_e;

  // Outputs of the C-element variants, one bit per circuit, all computing
  // the C-element function of the same two inputs.
  typedef struct packed {
    logic gc;            // domino generalized C-element
    logic gc_rt_fall;    // domino, assumes a falls before b
    logic gc_rt_rise;    // domino, assumes a rises before b
    logic sc;            // static majority gate
    logic sc_lt;         // static, locally timed by an output buffer
    logic sic;           // speed-independent complex gate
    logic sic_rt_fall;   // static, assumes a falls before b
    logic sic_rt_rise;   // static, assumes a rises before b
  } c_elem_out_t;

endpackage
