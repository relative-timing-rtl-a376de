`timescale 1ps/1ps
// tb_tag_pb: self-checking testbench for tag_pb.
//
// The testbench plays the environment (a) and the synchroniser (sa). After
// reset sr must be offered. Each of NCYC cycles: sa rises, so sr must fall
// and r rise; then sa falls and a rises in a random order, and r must stay
// high until both have happened; a then falls and sr must be offered again.
// Expected values follow PB = sr+ . sa+ . (sr- . sa- | r+ . a+) . r- . a- .
module tb_tag_pb;

  localparam int NCYC = 300;

  logic rst = 1'b1, a = 1'b0, sa = 1'b0;
  logic r, sr;
  int   checks = 0, failures = 0;
  int   n_a_first = 0, n_sa_first = 0;

  tag_pb dut (.rst(rst), .r(r), .a(a), .sr(sr), .sa(sa));

  task automatic chk(input logic got_r, input logic got_sr, input logic exp_r,
                     input logic exp_sr, input string what);
    checks++;
    if (got_r !== exp_r || got_sr !== exp_sr) begin
      failures++;
      $display("FAIL t=%0t %s: r=%b sr=%b expected r=%b sr=%b", $time, what,
               got_r, got_sr, exp_r, exp_sr);
    end
  endtask

  initial begin
    #10 rst = 1'b0;
    #10 chk(r, sr, 1'b0, 1'b1, "idle offers sr");
    for (int n = 0; n < NCYC; n++) begin
      sa = 1'b1; #10 chk(r, sr, 1'b1, 1'b0, "synchronised, request out");
      if ($urandom_range(0, 1) == 0) begin
        n_a_first++;
        a = 1'b1;  #10 chk(r, sr, 1'b1, 1'b0, "a high, sa still high");
        sa = 1'b0; #10 chk(r, sr, 1'b0, 1'b0, "both done");
      end else begin
        n_sa_first++;
        sa = 1'b0; #10 chk(r, sr, 1'b1, 1'b0, "sa low, a still low");
        a = 1'b1;  #10 chk(r, sr, 1'b0, 1'b0, "both done");
      end
      a = 1'b0;  #10 chk(r, sr, 1'b0, 1'b1, "ready again");
    end
    checks++;
    if (n_a_first == 0 || n_sa_first == 0) begin failures++; $display("FAIL coverage"); end
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
