`timescale 1ps/1ps
// tb_fifo_rt_shuffled: self-checking testbench for fifo_rt_shuffled.
//
// Drives one cell as its left neighbour would: li is a pulse of random width
// and li_n is li inverted and delayed by D, generated here. Expected, with a
// zero-delay gate and buffer delay D: ro rises with li and falls D later,
// whatever the width of li; ro_n is low from D to 2D after li rose. Finally
// li is raised while li_n is still low (the previous token has not passed),
// which breaks the cell's rule: the cell must then not fire, which is why
// the rule exists. The cell's assertion is switched off for that test.
module tb_fifo_rt_shuffled;

  localparam int D    = 100;
  localparam int NTOK = 300;

  logic rst = 1'b1, li = 1'b0, li_n;
  logic ro, ro_n;
  int   checks = 0, failures = 0;
  int   n_ro = 0, n_short = 0, n_long = 0;

  // the left neighbour's inverting buffer
  assign #(D) li_n = ~li;

  fifo_rt_shuffled #(.LO_DELAY_PS(D)) dut (
    .rst(rst), .li(li), .li_n(li_n), .ro(ro), .ro_n(ro_n)
  );

  always @(posedge ro) n_ro++;

  task automatic chk(input logic [1:0] exp, input string what);
    checks++;
    if ({ro, ro_n} !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: {ro,ro_n}=%b expected %b", $time, what, {ro, ro_n}, exp);
    end
  endtask

  initial begin
    int w, prev;
    #10 rst = 1'b0;
    #(3 * D);
    chk(2'b01, "idle after reset");
    for (int n = 0; n < NTOK; n++) begin
      w = $urandom_range(5, 3 * D);
      if (w < D) n_short++; else n_long++;
      prev = n_ro;
      fork
        begin
          li = 1'b1;
          #1       chk(2'b11, "ro rises with li");
          #(D - 2) chk(2'b11, "ro still high");
          #2       chk(2'b00, "ro reset after D");
          #(D - 2) chk(2'b00, "ro_n still low");
          #2       chk(2'b01, "ro_n high after 2D");
        end
        begin #(w) li = 1'b0; end
      join
      #(D + $urandom_range(5, 100));
      checks++;
      if (n_ro != prev + 1) begin
        failures++;
        $display("FAIL t=%0t token %0d gave %0d ro pulses", $time, n, n_ro - prev);
      end
    end
    // rule broken on purpose: li rises again while li_n is still low
    prev = n_ro;
    $assertoff(0, dut);
    li = 1'b1;
    #(D + 50) li = 1'b0;
    #20 li = 1'b1;
    #20 chk(2'b00, "no token taken while li_n low");
    #(D) li = 1'b0;
    #(3 * D);
    $asserton(0, dut);
    checks++;
    if (n_ro != prev + 1) begin
      failures++;
      $display("FAIL early li gave %0d pulses, expected 1", n_ro - prev);
    end
    $display("MECH tokens=%0d short_li=%0d long_li=%0d", NTOK, n_short, n_long);
    checks++;
    if (n_short == 0 || n_long == 0) begin failures++; $display("FAIL coverage"); end
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
