`timescale 1ps/1ps
// tb_tag_unit_si: self-checking testbench for tag_unit_si.
//
// Passes NTAG tags through the unit. For each tag the testbench picks the
// input line k_in the tag arrives on and the instruction length L, drives
// l one-hot, and runs the instruction-ready handshake (irdy/irdyack) and the
// tag-in handshake (ti[k_in]/tia[k_in]) concurrently with random delays.
// Two responders acknowledge the buffer request (bufreq/bufack) and the tag
// output (to/toa), each after a random delay, so the buffer is sometimes
// still busy when the next tag and instruction are ready.
// Checks, worked out from the specification rather than the circuit:
// only tia[k_in] acknowledges; the tag leaves on to[L] only; bufreq rises
// only while both irdy and a ti request are present; every tag produces
// exactly one bufreq, one irdyack and one to pulse.
module tb_tag_unit_si;

  localparam int N    = 7;
  localparam int NTAG = 300;

  logic         rst = 1'b1;
  logic [N-1:0] ti = '0, l = '0, toa = '0;
  logic [N-1:0] tia, to;
  logic         irdy = 1'b0, bufack = 1'b0;
  logic         irdyack, bufreq;
  int           checks = 0, failures = 0;
  int           n_buf = 0, n_irdyack = 0, n_to = 0, n_stall = 0;
  int           exp_len = 0;

  tag_unit_si #(.N_LEN(N)) dut (
    .rst(rst), .ti(ti), .tia(tia), .l(l), .to(to), .toa(toa),
    .irdy(irdy), .irdyack(irdyack), .bufreq(bufreq), .bufack(bufack)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // buffer responder
  initial forever begin
    @(posedge bufreq);
    n_buf++;
    chk(irdy && (ti != '0), "bufreq only with irdy and a tag present");
    #($urandom_range(5, 300)) bufack = 1'b1;
    wait (!bufreq);
    #($urandom_range(5, 300)) bufack = 1'b0;
  end

  // tag-out responder
  initial forever begin
    int k;
    wait (to != '0);
    n_to++;
    chk(to == N'(1) << exp_len, "tag steered to to[L]");
    k = exp_len;
    #($urandom_range(5, 100)) toa[k] = 1'b1;
    wait (to == '0);
    #($urandom_range(5, 100)) toa[k] = 1'b0;
  end

  always @(posedge irdyack) n_irdyack++;

  initial begin
    #10 rst = 1'b0;
    #10;
    for (int n = 0; n < NTAG; n++) begin
      int k_in;
      k_in = $urandom_range(0, N - 1);
      wait (to == '0 && toa == '0);
      exp_len = $urandom_range(0, N - 1);
      l = N'(1) << exp_len;
      fork
        begin : irdy_side
          #($urandom_range(5, 100)) irdy = 1'b1;
          wait (irdyack);
          #($urandom_range(5, 50)) irdy = 1'b0;
          wait (!irdyack);
        end
        begin : tag_side
          #($urandom_range(5, 100)) ti[k_in] = 1'b1;
          wait (tia[k_in]);
          chk(tia == N'(1) << k_in, "only the requesting tag input is acknowledged");
          #($urandom_range(5, 50)) ti[k_in] = 1'b0;
          wait (!tia[k_in]);
        end
        begin : stall_probe
          wait (irdy && ti != '0);
          if (bufreq || bufack || to != '0 || toa != '0) n_stall++;
        end
      join
    end
    wait (!bufreq && !bufack && to == '0 && toa == '0);
    #10;
    $display("MECH tags=%0d buffer_or_tagout_stalls=%0d", n_buf, n_stall);
    chk(n_buf == NTAG, "one bufreq per tag");
    chk(n_to == NTAG, "one tag output per tag");
    chk(n_irdyack == NTAG, "one irdyack per tag");
    chk(n_stall > 0, "a tag waited for the previous buffer or tag-out handshake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTAG * 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
