`timescale 1ps/1ps
// tb_fifo_agr_ring: self-checking testbench for fifo_agr_ring.
//
// Puts one token into the ring at its default size and lets it go round
// NREV times. Expected, with zero-delay gates, hop delay H and buffer delay
// D: cell i's ro rises at t0 + i*H + k*RING_SIZE*H in revolution k and
// stays high for H + D (until the next cell's lo answers), so no token is
// lost or duplicated. For every arrival the testbench also measures the
// slack of the ring assumption, the time from the cell's ri falling to its
// li rising again. It must be at least RING_SIZE*H - 2*H - 2*D, and exactly
// that once the token circulates (the injected pulse is narrower than a
// circulating one, so the first return to the last cell has more slack). Then the ring is
// reset, must stay empty, and takes a second token injected with a
// different pulse width.
module tb_fifo_agr_ring;

  localparam int N    = 8;
  localparam int H    = rt_pkg::DEFAULT_DELAY_PS;
  localparam int D    = rt_pkg::DEFAULT_DELAY_PS;
  localparam int NREV = 25;
  localparam int PER  = N * H;
  localparam int SLACK = N * H - 2 * H - 2 * D;

  logic         rst = 1'b1, inject = 1'b0;
  logic [N-1:0] stage_ro;
  int           checks = 0, failures = 0;
  int           n_rise [N];
  int           n_revs = 0, n_slack = 0;
  time          t0;
  time          t_rise [N];
  time          t_ri_fall [N];

  fifo_agr_ring dut (.rst(rst), .inject(inject), .stage_ro(stage_ro));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  for (genvar i = 0; i < N; i++) begin : g_mon
    always @(posedge stage_ro[i]) if (!rst) begin
      time exp;
      exp = t0 + i * H + n_rise[i] * PER;
      chk($time == exp, $sformatf("cell %0d rise %0d at %0t, expected %0t", i, n_rise[i], $time, exp));
      t_rise[i] = $time;
      n_rise[i]++;
      if (i == N - 1) n_revs++;
    end
    always @(negedge stage_ro[i]) if (!rst) begin
      chk($time - t_rise[i] == H + D, $sformatf("cell %0d ro width %0t", i, $time - t_rise[i]));
    end
    // ring assumption slack: ri of cell i is lo of cell i+1
    always @(negedge dut.lo[(i + 1) % N]) t_ri_fall[i] = $time;
    always @(posedge dut.li[i]) if (!rst && t_ri_fall[i] != 0) begin
      chk($time - t_ri_fall[i] >= SLACK, $sformatf("cell %0d slack %0t, expected %0d", i, $time - t_ri_fall[i], SLACK));
      if ($time - t_ri_fall[i] == SLACK) n_slack++;
    end
  end

  task automatic run_token(input int w);
    foreach (n_rise[i]) n_rise[i] = 0;
    foreach (t_ri_fall[i]) t_ri_fall[i] = 0;
    n_revs = 0;
    t0 = $time;
    inject = 1'b1;
    #(w) inject = 1'b0;
    wait (n_revs == NREV);
    #1;
    foreach (n_rise[i]) chk(n_rise[i] == NREV, $sformatf("cell %0d fired %0d times", i, n_rise[i]));
  endtask

  initial begin
    #(3 * D) rst = 1'b0;
    #(3 * D);
    chk(stage_ro == '0, "ring empty after reset");
    run_token($urandom_range(5, H + D));
    // reset empties the ring
    rst = 1'b1;
    #(H + D + 10) rst = 1'b0;
    #(3 * PER);
    chk(stage_ro == '0 && dut.li == '0, "ring empty after second reset");
    run_token($urandom_range(5, H + D));
    $display("MECH revolutions=%0d slack_checks=%0d slack_ps=%0d", 2 * NREV, n_slack, SLACK);
    chk(n_slack >= 2 * (NREV - 1) * N, "ring assumption measured on every arrival");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4 * NREV * PER + 10 * PER);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
