`timescale 1ps/1ps
// tb_fifo_rt_agr: self-checking testbench for fifo_rt_agr.
//
// Sends NTOK tokens through the cell. For each token the left environment
// raises li, waits for lo, lowers li and waits for lo to fall; the right
// environment acknowledges ro with a four-phase ri handshake after a random
// delay. Both sides keep the cell's timing rules: ri falls only after the
// buffered lo has risen, and the next li rises only after ri has fallen.
// Checked against the specification: ro rises with li, falls with ri and
// stays low after ri falls even if li is still high; lo rises exactly
// LO_DELAY_PS after li and falls LO_DELAY_PS after li falls. The run counts
// tokens acknowledged on the right before and after lo rose.
module tb_fifo_rt_agr;

  localparam int D    = 100;
  localparam int NTOK = 300;

  logic rst = 1'b1, li = 1'b0, ri = 1'b0;
  logic lo, ro;
  int   checks = 0, failures = 0;
  int   n_early_ack = 0, n_late_ack = 0;

  fifo_rt_agr #(.LO_DELAY_PS(D)) dut (.rst(rst), .li(li), .lo(lo), .ro(ro), .ri(ri));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    #10 rst = 1'b0;
    #(2 * D);
    chk(ro, 1'b0, "ro after reset");
    chk(lo, 1'b0, "lo after reset");
    for (int n = 0; n < NTOK; n++) begin
      int t_ack;
      t_ack = $urandom_range(10, 2 * D);
      li = 1'b1;
      #1 chk(ro, 1'b1, "ro rises with li");
      fork
        begin : left
          #(D - 2) chk(lo, 1'b0, "lo before buffer delay");
          #2       chk(lo, 1'b1, "lo after buffer delay");
          #($urandom_range(5, 2 * D));
          li = 1'b0;
          #(D - 1) chk(lo, 1'b1, "lo before falling delay");
          #2       chk(lo, 1'b0, "lo falls after li");
        end
        begin : right
          #(t_ack - 1);
          if (t_ack < D) n_early_ack++; else n_late_ack++;
          ri = 1'b1;
          #1 chk(ro, 1'b0, "ro falls with ri");
          wait (lo == 1'b1);
          #($urandom_range(1, D));
          ri = 1'b0;
          #1 chk(ro, 1'b0, "ro stays low after ri falls");
        end
      join
      #($urandom_range(1, 50));
    end
    $display("MECH early_ack=%0d late_ack=%0d", n_early_ack, n_late_ack);
    checks++;
    if (n_early_ack == 0 || n_late_ack == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTOK * 10 * D);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
