`timescale 1ps/1ps
// tb_tag_c4: self-checking testbench for tag_c4.
//
// Runs NCYC four-phase synchronisation cycles: the four go requests rise one
// at a time in a random order, then fall one at a time in a random order.
// A four-input C-element is the reference: sa must stay low until the last
// go has risen, then be high, stay high until the last go has fallen, and
// then be low. Checked after every edge.
module tb_tag_c4;

  localparam int NCYC = 300;

  logic [3:0] go = '0;
  logic       sa;
  logic       sa_ref = 1'b0;
  int         checks = 0, failures = 0;

  tag_c4 dut (.go(go), .sa(sa));

  task automatic phase(input logic val);
    int order [4] = '{0, 1, 2, 3};
    order.shuffle();
    foreach (order[i]) begin
      go[order[i]] = val;
      #10;
      if (go == 4'hf)      sa_ref = 1'b1;
      else if (go == 4'h0) sa_ref = 1'b0;
      checks++;
      if (sa !== sa_ref) begin
        failures++;
        $display("FAIL t=%0t go=%b sa=%b expected %b", $time, go, sa, sa_ref);
      end
    end
  endtask

  initial begin
    #10;
    for (int n = 0; n < NCYC; n++) begin
      phase(1'b1);
      phase(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NCYC * 200 + 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
