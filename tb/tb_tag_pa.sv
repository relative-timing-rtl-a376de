`timescale 1ps/1ps
// tb_tag_pa: self-checking testbench for tag_pa.
//
// The testbench plays both the environment (r) and the synchroniser (sa).
// Each of NCYC cycles: r rises and sr must follow; sa rises and sr must fall
// while a rises; then r falls and sa falls in a random order, and a must
// stay high until both have fallen. The expected values come from the
// process specification PA = r+ . sr+ . sa+ . (sr- . sa- | a+ . r-) . a- .
module tb_tag_pa;

  localparam int NCYC = 300;

  logic r = 1'b0, sa = 1'b0;
  logic a, sr;
  int   checks = 0, failures = 0;
  int   n_r_first = 0, n_sa_first = 0;

  tag_pa dut (.r(r), .a(a), .sr(sr), .sa(sa));

  task automatic chk(input logic got_a, input logic got_sr, input logic exp_a,
                     input logic exp_sr, input string what);
    checks++;
    if (got_a !== exp_a || got_sr !== exp_sr) begin
      failures++;
      $display("FAIL t=%0t %s: a=%b sr=%b expected a=%b sr=%b", $time, what,
               got_a, got_sr, exp_a, exp_sr);
    end
  endtask

  initial begin
    #10 chk(a, sr, 1'b0, 1'b0, "idle");
    for (int n = 0; n < NCYC; n++) begin
      r = 1'b1;  #10 chk(a, sr, 1'b0, 1'b1, "request forwarded");
      sa = 1'b1; #10 chk(a, sr, 1'b1, 1'b0, "synchronised");
      if ($urandom_range(0, 1) == 0) begin
        n_r_first++;
        r = 1'b0;  #10 chk(a, sr, 1'b1, 1'b0, "r low, sa still high");
        sa = 1'b0; #10 chk(a, sr, 1'b0, 1'b0, "both low");
      end else begin
        n_sa_first++;
        sa = 1'b0; #10 chk(a, sr, 1'b1, 1'b0, "sa low, r still high");
        r = 1'b0;  #10 chk(a, sr, 1'b0, 1'b0, "both low");
      end
    end
    checks++;
    if (n_r_first == 0 || n_sa_first == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NCYC * 100 + 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
