`timescale 1ps/1ps
// tb_fifo_pulse: self-checking testbench for fifo_pulse.
//
// Sends NPULSE input pulses whose widths are random but obey the cell's
// timing rules (shorter than two inverter delays, spaced so that y is high
// again before the next one). For each pulse it checks that ro rises with
// li, stays high for exactly Y_DELAY_PS and produces exactly one output
// pulse. Finally it breaks the rule "li falls before y rises" on purpose
// with one overlong pulse and checks that the cell then emits a second,
// unwanted pulse, which is why the source makes that ordering a constraint.
// The cell's own assertion for that rule is switched off during the test.
module tb_fifo_pulse;

  localparam int D      = 100;
  localparam int NPULSE = 300;

  logic li = 1'b0;
  logic ro;
  int   checks = 0, failures = 0;
  int   n_ro = 0;

  fifo_pulse #(.Y_DELAY_PS(D)) dut (.li(li), .ro(ro));

  always @(posedge ro) n_ro++;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    int n_prev;
    #(3 * D);
    chk(ro, 1'b0, "idle ro");
    n_ro = 0;
    for (int n = 0; n < NPULSE; n++) begin
      int w;
      w = $urandom_range(5, 2 * D - 10);
      if (w == D) w = D + 1;
      n_prev = n_ro;
      li = 1'b1;
      if (w < D) begin
        #1       chk(ro, 1'b1, "ro rises with li");
        #(w - 1) li = 1'b0;
        #(D - w - 1) chk(ro, 1'b1, "ro before pulse end");
        #2       chk(ro, 1'b0, "ro after pulse end");
      end else begin
        #1       chk(ro, 1'b1, "ro rises with li");
        #(D - 2) chk(ro, 1'b1, "ro before pulse end");
        #2       chk(ro, 1'b0, "ro after pulse end");
        #(w - D - 1) li = 1'b0;
      end
      #(2 * D + $urandom_range(5, 100));
      checks++;
      if (n_ro != n_prev + 1) begin
        failures++;
        $display("FAIL t=%0t pulse %0d gave %0d output pulses", $time, n, n_ro - n_prev);
      end
    end
    // deliberate violation: li still high when y rises again; the cell's
    // assertion for this rule is switched off for the experiment
    n_prev = n_ro;
    $assertoff(0, dut);
    li = 1'b1;
    #(2 * D + 50) li = 1'b0;
    #(3 * D);
    $asserton(0, dut);
    $display("MECH pulses=%0d overlong_pulse_outputs=%0d", NPULSE, n_ro - n_prev);
    checks++;
    if (n_ro - n_prev != 2) begin
      failures++;
      $display("FAIL overlong pulse gave %0d output pulses, expected 2", n_ro - n_prev);
    end
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
