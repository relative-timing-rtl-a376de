`timescale 1ps/1ps
// tb_fifo_agr_chain: self-checking testbench for fifo_agr_chain.
//
// Passes NTOK tokens through a three-stage chain of aggressive FIFO cells.
// The left environment raises li, waits for lo, lowers li and waits for lo
// to fall; the right environment acknowledges the last ro with a four-phase
// ri handshake after a random delay longer than one buffer delay. Tokens are
// spaced so that every stage is idle when the next one arrives (the ring
// assumption). Expected, with zero-delay gates and buffer delay D: all
// stage outputs rise with li; the inner ones fall D later, when the next
// stage's lo acknowledges them; the last one stays high until ri rises; lo
// follows li after D.
module tb_fifo_agr_chain;

  localparam int D      = 100;
  localparam int STAGES = 3;
  localparam int NTOK   = 200;

  logic              rst = 1'b1, li = 1'b0, ri = 1'b0;
  logic              lo, ro;
  logic [STAGES-1:0] stage_ro;
  int                checks = 0, failures = 0;
  int                n_tok = 0;

  fifo_agr_chain #(.STAGES(STAGES), .LO_DELAY_PS(D)) dut (
    .rst(rst), .li(li), .lo(lo), .ro(ro), .ri(ri), .stage_ro(stage_ro)
  );

  task automatic chk(input logic [STAGES-1:0] got, input logic [STAGES-1:0] exp,
                     input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    int t_ack;
    #10 rst = 1'b0;
    #(3 * D);
    chk(stage_ro, '0, "idle after reset");
    for (int n = 0; n < NTOK; n++) begin
      t_ack = $urandom_range(D + 10, 3 * D);
      li = 1'b1;
      #1       chk(stage_ro, '1, "token enters every stage");
      #(D - 2) chk({stage_ro, lo}, {{STAGES{1'b1}}, 1'b0}, "before inner acknowledge");
      #2       chk({stage_ro, lo}, {1'b1, {(STAGES - 1){1'b0}}, 1'b1}, "inner stages acknowledged");
      #($urandom_range(5, 50)) li = 1'b0;
      #(t_ack - D - 1);
      chk(ro, 1'b1, "last stage holds until ri");
      ri = 1'b1;
      #1 chk(stage_ro, '0, "last stage acknowledged");
      n_tok++;
      #($urandom_range(D + 5, 2 * D)) ri = 1'b0;
      #(3 * D) chk({stage_ro, lo}, '0, "idle between tokens");
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
