`timescale 1ps/1ps
// tb_tag_unit_rappid: self-checking testbench for tag_unit_rappid.
//
// Passes NTAG tags through the pulse-mode tag unit. For each tag: irdy is
// raised (instruction decoded, buffer free), then a tag pulse of random
// width arrives on a random input ti[k_in] with a random length L on l. The
// buffer answers bufreq by raising bufack after a random delay longer than
// the tag pulse. The decoder lowers irdy only after the irdyack pulse has
// ended, and irdy and bufack return low in a random order. Expected, from
// the specification: bufreq, irdyack and to[L] rise together when the tag
// arrives, nothing else rises, all three fall when bufack rises, and
// nothing fires again when bufack falls while irdy is still high. At the
// end one tag is sent while the buffer is still busy: it must produce no
// output, which is why the tag may only arrive while rdy is high.
module tb_tag_unit_rappid;

  localparam int N    = 7;
  localparam int D    = 100;
  localparam int NTAG = 300;

  logic [N-1:0] ti = '0, l = '0;
  logic [N-1:0] to;
  logic         irdy = 1'b0, bufack = 1'b0;
  logic         irdyack, bufreq;
  int           checks = 0, failures = 0;
  int           n_fire = 0, n_irdy_first = 0, n_buf_first = 0;

  tag_unit_rappid #(.N_LEN(N), .TL_DELAY_PS(D)) dut (
    .ti(ti), .l(l), .to(to), .irdy(irdy), .irdyack(irdyack),
    .bufreq(bufreq), .bufack(bufack)
  );

  always @(posedge bufreq) n_fire++;

  task automatic chk_out(input logic on, input logic [N-1:0] lmask, input string what);
    logic [N+1:0] exp, got;
    exp = on ? {1'b1, 1'b1, lmask} : '0;
    got = {bufreq, irdyack, to};
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: {bufreq,irdyack,to}=%b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    int fires_before;
    #(3 * D);
    chk_out(1'b0, '0, "idle");
    for (int n = 0; n < NTAG; n++) begin
      int k_in, len, w, t_buf, t_rel;
      k_in  = $urandom_range(0, N - 1);
      len   = $urandom_range(0, N - 1);
      w     = $urandom_range(10, 80);
      t_buf = $urandom_range(w + 10, w + 200);
      l = N'(1) << len;
      #($urandom_range(5, 50)) irdy = 1'b1;
      #($urandom_range(10, 50));
      ti[k_in] = 1'b1;
      fork
        begin #(w) ti[k_in] = 1'b0; end
        begin #(t_buf) bufack = 1'b1; end
        begin
          #1           chk_out(1'b1, l, "outputs fire with the tag");
          #(t_buf - 2) chk_out(1'b1, l, "outputs held until bufack");
          #2           chk_out(1'b0, '0, "outputs end on bufack");
        end
      join
      // return to idle: irdy and bufack fall in either order
      t_rel = $urandom_range(5, 100);
      if ($urandom_range(0, 1) == 0) begin
        n_irdy_first++;
        #(t_rel) irdy = 1'b0;
        #($urandom_range(5, 100)) bufack = 1'b0;
      end else begin
        n_buf_first++;
        #(t_rel) bufack = 1'b0;
        #1 chk_out(1'b0, '0, "no second firing when rdy returns");
        #($urandom_range(5, 100)) irdy = 1'b0;
      end
      #(D + $urandom_range(10, 50));
    end
    checks++;
    if (n_fire != NTAG) begin failures++; $display("FAIL fired %0d times", n_fire); end
    // tag arriving while the buffer is still busy (rdy low) is not taken
    // (this breaks the unit's timing rule on purpose, so its assertions are
    // switched off for the experiment)
    fires_before = n_fire;
    $assertoff(0, dut);
    irdy = 1'b1;
    bufack = 1'b1;
    #50 ti[0] = 1'b1;
    #50 ti[0] = 1'b0;
    #50 chk_out(1'b0, '0, "no output while buffer busy");
    bufack = 1'b0;
    #(2 * D);
    $asserton(0, dut);
    checks++;
    if (n_fire != fires_before) begin failures++; $display("FAIL fired while rdy low"); end
    $display("MECH fires=%0d irdy_fell_first=%0d bufack_fell_first=%0d", n_fire, n_irdy_first, n_buf_first);
    checks++;
    if (n_irdy_first == 0 || n_buf_first == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTAG * 10 * D);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
