`timescale 1ps/1ps
// tb_fifo_pulse_chain: self-checking testbench for fifo_pulse_chain.
//
// Sends NPULSE legal input pulses (shorter than the inverter delay, spaced
// by more than two delays) into a three-stage chain. For every input pulse
// each stage must emit exactly one pulse of width Y_DELAY_PS, starting with
// the input pulse (the gates have zero delay), and the chain output must
// equal the last stage.
module tb_fifo_pulse_chain;

  localparam int D      = 100;
  localparam int STAGES = 3;
  localparam int NPULSE = 200;

  logic              li = 1'b0;
  logic              ro;
  logic [STAGES-1:0] stage_ro;
  int                n_out [STAGES];
  int                checks = 0, failures = 0;

  fifo_pulse_chain #(.STAGES(STAGES), .Y_DELAY_PS(D)) dut (
    .li(li), .ro(ro), .stage_ro(stage_ro)
  );

  for (genvar s = 0; s < STAGES; s++) begin : g_cnt
    always @(posedge stage_ro[s]) n_out[s]++;
  end

  task automatic chk(input logic [STAGES-1:0] got, input logic [STAGES-1:0] exp,
                     input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    #(3 * D);
    foreach (n_out[s]) n_out[s] = 0;
    chk(stage_ro, '0, "idle");
    for (int n = 0; n < NPULSE; n++) begin
      int w;
      w = $urandom_range(5, D - 5);
      li = 1'b1;
      #1       chk(stage_ro, '1, "all stages fire");
      #(w - 1) li = 1'b0;
      #(D - w - 1) chk(stage_ro, '1, "pulses still high");
      #2       chk(stage_ro, '0, "pulses ended");
      checks++;
      if (ro !== stage_ro[STAGES-1]) begin failures++; $display("FAIL ro output"); end
      #(2 * D + $urandom_range(5, 100));
    end
    for (int s = 0; s < STAGES; s++) begin
      checks++;
      if (n_out[s] != NPULSE) begin
        failures++;
        $display("FAIL stage %0d emitted %0d pulses, expected %0d", s, n_out[s], NPULSE);
      end
    end
    $display("MECH tokens=%0d", n_out[STAGES-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NPULSE * 10 * D);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
