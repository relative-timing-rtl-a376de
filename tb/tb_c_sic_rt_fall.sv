`timescale 1ps/1ps
// tb_c_sic_rt_fall: self-checking testbench for c_sic_rt_fall.
//
// Drives the C-element with 200 random four-phase input cycles in the
// environment the element is built for (a falls before b) and, after every input
// edge, compares z with a reference C-element computed here: z rises when
// both inputs are high, falls when both are low, holds otherwise. Outputs
// are sampled 10 ps after each edge. A watchdog ends the run if it
// hangs.
module tb_c_sic_rt_fall;

  localparam int NCYC   = 200;
  localparam int SETTLE = 10;
  localparam int ENV    = 1;   // 0 any order, 1 a falls first, 2 a rises first

  logic a = 1'b0, b = 1'b0;
  logic z;
  logic z_ref = 1'b0;
  int   checks = 0, failures = 0;
  int   holds = 0;     // edges after which the reference held its value

  c_sic_rt_fall dut (.a(a), .b(b), .z(z));

  task automatic step(input bit which, input logic val);
    if (which == 1'b0) a = val; else b = val;
    #(SETTLE);
    if (a && b)        z_ref = 1'b1;
    else if (!a && !b) z_ref = 1'b0;
    else               holds++;
    checks++;
    if (z !== z_ref) begin
      failures++;
      $display("FAIL t=%0t a=%b b=%b z=%b expected %b", $time, a, b, z, z_ref);
    end
  endtask

  initial begin
    #(SETTLE);
    checks++;
    if (z !== 1'b0) begin failures++; $display("FAIL initial z=%b", z); end
    for (int i = 0; i < NCYC; i++) begin
      bit first;
      // rising phase
      first = (ENV == 2) ? 1'b0 : 1'($urandom_range(0, 1));
      step(first, 1'b1);
      // occasionally bounce the first input back in unordered environments
      if (ENV == 0 && $urandom_range(0, 3) == 0) begin
        step(first, 1'b0);
        step(first, 1'b1);
      end
      step(~first, 1'b1);
      // falling phase
      first = (ENV == 1) ? 1'b0 : 1'($urandom_range(0, 1));
      step(first, 1'b0);
      step(~first, 1'b0);
    end
    checks++;
    if (holds < NCYC) begin
      failures++;
      $display("FAIL hold state exercised only %0d times", holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(SETTLE * NCYC * 10 + 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
