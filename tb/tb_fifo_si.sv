`timescale 1ps/1ps
// tb_fifo_si: self-checking testbench for fifo_si.
//
// A random environment plays both neighbours of the cell: at every step it
// picks one of the edges its four-phase protocols allow (li+ when lo is low,
// li- when lo is high, ri+ when ro is high, ri- when ro is low) and applies
// it. A reference of the cell's specification, kept here, predicts lo and
// ro: both rise together once li is high and the right side is idle (ro and
// ri low); lo falls after li falls; ro falls after ri rises. The outputs are
// compared after every edge. The run counts synchronisations and the stalls
// in which a new li waited for the right handshake to finish.
module tb_fifo_si;

  localparam int NSTEP = 2000;

  logic rst = 1'b1, li = 1'b0, ri = 1'b0;
  logic lo, ro;
  logic exp_lo = 1'b0, exp_ro = 1'b0, pending = 1'b0;
  int   checks = 0, failures = 0;
  int   n_sync = 0, n_stall = 0;

  fifo_si dut (.rst(rst), .li(li), .lo(lo), .ro(ro), .ri(ri));

  function automatic void fire();
    exp_lo  = 1'b1;
    exp_ro  = 1'b1;
    pending = 1'b0;
    n_sync++;
  endfunction

  initial begin
    #10 rst = 1'b0;
    #10;
    for (int s = 0; s < NSTEP; s++) begin
      int pick;
      pick = $urandom_range(0, 3);
      unique case (pick)
        0: if (!li && !exp_lo) begin
             li = 1'b1;
             if (!exp_ro && !ri) fire();
             else begin pending = 1'b1; n_stall++; end
           end
        1: if (li && exp_lo) begin li = 1'b0; exp_lo = 1'b0; end
        2: if (exp_ro && !ri) begin ri = 1'b1; exp_ro = 1'b0; end
        3: if (ri && !exp_ro) begin ri = 1'b0; if (pending) fire(); end
        default: ;
      endcase
      #($urandom_range(5, 40));
      checks++;
      if (lo !== exp_lo || ro !== exp_ro) begin
        failures++;
        $display("FAIL t=%0t li=%b ri=%b lo=%b ro=%b expected lo=%b ro=%b",
                 $time, li, ri, lo, ro, exp_lo, exp_ro);
      end
    end
    $display("MECH syncs=%0d stalls=%0d", n_sync, n_stall);
    checks++;
    if (n_sync < NSTEP / 20 || n_stall == 0) begin
      failures++;
      $display("FAIL too few synchronisations or stalls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NSTEP * 50 + 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
