`timescale 1ps/1ps
// tb_delay_line: self-checking testbench for delay_line.
//
// Drives a buffer and an inverter instance (DELAY_PS = 100) with a random
// mix of long levels and short pulses. A level that lasts at least the delay
// must appear at the output exactly DELAY_PS later (checked 1 ps before and
// 1 ps after); a pulse shorter than the delay must be swallowed (the output
// is checked every picosecond until the pulse could have arrived).
module tb_delay_line;

  localparam int D = 100;

  logic a = 1'b0;
  logic y_buf, y_inv;
  logic settled = 1'b0;    // value a has held long enough to be at the output
  int   checks = 0, failures = 0;
  int   n_long = 0, n_short = 0;

  delay_line #(.DELAY_PS(D), .INVERT(1'b0)) dut_buf (.a(a), .y(y_buf));
  delay_line #(.DELAY_PS(D), .INVERT(1'b1)) dut_inv (.a(a), .y(y_inv));

  task automatic expect_out(input logic v, input string what);
    checks += 2;
    if (y_buf !== v)  begin failures++; $display("FAIL t=%0t %s buf=%b exp %b", $time, what, y_buf, v); end
    if (y_inv !== ~v) begin failures++; $display("FAIL t=%0t %s inv=%b exp %b", $time, what, y_inv, ~v); end
  endtask

  initial begin
    #(2 * D);
    expect_out(1'b0, "initial");
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 1) == 0) begin
        // long level
        n_long++;
        a = ~a;
        #(D - 1) expect_out(settled, "before delay");
        #2       expect_out(a, "after delay");
        settled = a;
        #($urandom_range(1, 60));
      end else begin
        // short pulse
        int w;
        n_short++;
        w = $urandom_range(1, D - 1);
        a = ~a;
        #(w) a = ~a;
        for (int t = 0; t < D + 5; t++) #1 expect_out(settled, "short pulse");
      end
    end
    checks++;
    if (n_long == 0 || n_short == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * D);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
