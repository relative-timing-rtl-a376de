`timescale 1ps/1ps
// tb_fifo_shuffled_chain: self-checking testbench for fifo_shuffled_chain.
//
// Passes NTOK tokens through a three-stage chain of shuffled aggressive
// cells, and the same tokens through a three-stage chain of ordinary
// aggressive cells whose last stage is acknowledged by a four-phase ri
// handshake. Expected, with zero-delay gates and buffer delay D: every
// stage of the shuffled chain rises with li and falls D later; the last
// ro_n is low from D to 2D after li rose. The inner stages of the two
// chains must be identical at every check, since moving the buffers across
// the cell boundaries does not change the timing. li stays high for a random
// time longer than D (the aggressive cell's rule) and rises again only once
// both chains have recovered.
module tb_fifo_shuffled_chain;

  localparam int D      = 100;
  localparam int STAGES = 3;
  localparam int NTOK   = 200;

  logic              rst = 1'b1, li = 1'b0, ri = 1'b0;
  logic              ro, ro_n, agr_lo, agr_ro;
  logic [STAGES-1:0] stage_ro, agr_stage_ro;
  int                checks = 0, failures = 0;
  int                n_tok = 0;

  fifo_shuffled_chain #(.STAGES(STAGES), .LO_DELAY_PS(D)) dut (
    .rst(rst), .li(li), .ro(ro), .ro_n(ro_n), .stage_ro(stage_ro)
  );

  fifo_agr_chain #(.STAGES(STAGES), .LO_DELAY_PS(D)) ref_chain (
    .rst(rst), .li(li), .lo(agr_lo), .ro(agr_ro), .ri(ri), .stage_ro(agr_stage_ro)
  );

  task automatic chk(input logic [STAGES:0] got, input logic [STAGES:0] exp,
                     input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: {stage_ro,ro_n}=%b expected %b", $time, what, got, exp);
    end
    checks++;
    if (stage_ro[STAGES-2:0] !== agr_stage_ro[STAGES-2:0]) begin
      failures++;
      $display("FAIL t=%0t %s: inner stages %b differ from aggressive chain %b", $time,
               what, stage_ro[STAGES-2:0], agr_stage_ro[STAGES-2:0]);
    end
  endtask

  initial begin
    int w, t_ri, t_ri_w;
    #10 rst = 1'b0;
    #(3 * D);
    chk({stage_ro, ro_n}, {{STAGES{1'b0}}, 1'b1}, "idle after reset");
    for (int n = 0; n < NTOK; n++) begin
      w      = $urandom_range(D + 5, 3 * D);   // li high time
      t_ri   = $urandom_range(D + 10, 2 * D);  // ri rise, after li rose
      t_ri_w = $urandom_range(5, 50);          // ri high time
      fork
        begin
          li = 1'b1;
          #1       chk({stage_ro, ro_n}, {{STAGES{1'b1}}, 1'b1}, "token enters every stage");
          #(D - 2) chk({stage_ro, ro_n}, {{STAGES{1'b1}}, 1'b1}, "just before self-reset");
          #2       chk({stage_ro, ro_n}, {{STAGES{1'b0}}, 1'b0}, "all stages reset after D");
          #(D - 2) chk({stage_ro, ro_n}, {{STAGES{1'b0}}, 1'b0}, "ro_n still low");
          #2       chk({stage_ro, ro_n}, {{STAGES{1'b0}}, 1'b1}, "ro_n back high after 2D");
        end
        begin #(w) li = 1'b0; end
        begin #(t_ri) ri = 1'b1; #(t_ri_w) ri = 1'b0; end
      join
      wait (li == 1'b0 && ri == 1'b0);
      #(D + $urandom_range(5, 100));
      chk({stage_ro, ro_n}, {{STAGES{1'b0}}, 1'b1}, "idle between tokens");
      n_tok++;
    end
    $display("MECH tokens=%0d", n_tok);
    checks++;
    if (n_tok != NTOK) begin failures++; $display("FAIL token count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTOK * 20 * D);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
