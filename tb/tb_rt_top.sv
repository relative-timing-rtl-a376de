`timescale 1ps/1ps
// tb_rt_top: end-to-end testbench of rt_top at its default parameters.
//
// Runs every family of circuits in the top at once, each against its own
// reference model and environment:
//   domino gates   random vectors against the set-reset definitions
//   C-elements     ordered four-phase cycles (a+ b+ a- b-), which meet the
//                  assumptions of all eight variants; every output bit is
//                  compared with a reference C-element
//   SI / BM FIFO   one random four-phase environment drives both cells; a
//                  reference of the cell specification predicts lo and ro
//   aggressive chain  tokens from the left, four-phase answer on the right
//   shuffled chain    tokens from the left; every stage pulses for one delay
//   ring           one token injected; it must visit every cell once per
//                  revolution, one hop delay per cell
//   pulse chain    legal pulses; each stage must pulse once per input
//   SI tag unit    tags with random input line and length, buffer and
//                  tag-out responders
//   pulse tag unit tag pulses while rdy is high; the pulse ends on bufack,
//                  then irdy and bufack return low in either order
// It counts how often each mechanism occurred (C-element hold, FIFO
// synchronisation stall, both burst-mode return paths, token through each
// chain, tag steering, tag-unit stall on a busy buffer, pulse tag unit
// released in both orders) and fails if any never happened.
module tb_rt_top;
  import rt_pkg::*;

  localparam int D      = DEFAULT_DELAY_PS;
  localparam int STAGES = 3;
  localparam int N      = N_LEN;

  logic              rst = 1'b1;
  logic              dom_x = 0, dom_a = 0, dom_b = 0, dom_c = 0;
  logic              dom_z_footed, dom_z_unfooted;
  logic              c_a = 0, c_b = 0;
  c_elem_out_t       c_z;
  logic              si_li = 0, si_ri = 0, si_lo, si_ro;
  logic              bm_li = 0, bm_ri = 0, bm_lo, bm_ro;
  logic              agr_li = 0, agr_ri = 0, agr_lo, agr_ro;
  logic [STAGES-1:0] agr_stage_ro, pls_stage_ro;
  logic              pls_li = 0, pls_ro;
  logic              shf_li = 0, shf_ro, shf_ro_n;
  localparam int     RING = 8;
  logic              ring_inject = 0;
  logic [RING-1:0]   ring_ro;
  logic [STAGES-1:0] shf_stage_ro;
  logic [N-1:0]      tsi_ti = '0, tsi_l = '0, tsi_toa = '0, tsi_tia, tsi_to;
  logic              tsi_irdy = 0, tsi_bufack = 0, tsi_irdyack, tsi_bufreq;
  logic [N-1:0]      trp_ti = '0, trp_l = '0, trp_to;
  logic              trp_irdy = 0, trp_bufack = 0, trp_irdyack, trp_bufreq;

  int checks = 0, failures = 0;

  // mechanism counters
  int m_dom_set = 0, m_dom_reset = 0, m_c_hold = 0;
  int m_fifo_sync = 0, m_fifo_stall = 0, m_bm_left_first = 0, m_bm_right_first = 0;
  int m_agr_tokens = 0, m_shf_tokens = 0, m_pls_tokens = 0, m_ring_revs = 0;
  int m_tsi_tags = 0, m_tsi_stall = 0;
  int m_trp_irdy_first = 0, m_trp_buf_first = 0;

  rt_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- domino
  task automatic run_domino();
    logic ref_f = 1'b0, ref_u = 1'b0;
    {dom_x, dom_a, dom_b, dom_c} = 4'b0000;
    #10;
    for (int i = 0; i < 200; i++) begin
      {dom_x, dom_a, dom_b, dom_c} = 4'($urandom_range(0, 15));
      #10;
      if (dom_x && dom_a && (dom_b || dom_c)) begin ref_f = 1'b1; m_dom_set++; end
      else if (!dom_x) begin ref_f = 1'b0; m_dom_reset++; end
      if (dom_a && (dom_b || dom_c)) ref_u = 1'b1;
      else if (!dom_x) ref_u = 1'b0;
      chk(dom_z_footed === ref_f && dom_z_unfooted === ref_u, "domino gates");
    end
  endtask

  // ------------------------------------------------------------ C-elements
  task automatic c_step(input bit which, input logic v, input logic exp, input bit hold);
    if (which == 1'b0) c_a = v; else c_b = v;
    #(D + 20);
    if (hold) m_c_hold++;
    chk(c_z === {8{exp}}, "C-element variants");
  endtask

  task automatic run_c();
    #(D + 20);
    chk(c_z === '0, "C-elements idle");
    for (int i = 0; i < 100; i++) begin
      c_step(1'b0, 1'b1, 1'b0, 1'b1);
      c_step(1'b1, 1'b1, 1'b1, 1'b0);
      c_step(1'b0, 1'b0, 1'b1, 1'b1);
      c_step(1'b1, 1'b0, 1'b0, 1'b0);
    end
  endtask

  // -------------------------------------------------------- SI and BM FIFO
  task automatic run_fifo();
    logic exp_lo = 1'b0, exp_ro = 1'b0, pending = 1'b0;
    logic li = 1'b0, ri = 1'b0;
    for (int s = 0; s < 1000; s++) begin
      int pick;
      pick = $urandom_range(0, 3);
      unique case (pick)
        0: if (!li && !exp_lo) begin
             li = 1'b1;
             if (!exp_ro && !ri) begin exp_lo = 1; exp_ro = 1; m_fifo_sync++; end
             else begin pending = 1'b1; m_fifo_stall++; end
           end
        1: if (li && exp_lo) begin
             li = 1'b0;
             if (exp_ro) m_bm_left_first++;
             exp_lo = 1'b0;
           end
        2: if (exp_ro && !ri) begin
             ri = 1'b1;
             if (exp_lo) m_bm_right_first++;
             exp_ro = 1'b0;
           end
        3: if (ri && !exp_ro) begin
             ri = 1'b0;
             if (pending) begin exp_lo = 1; exp_ro = 1; pending = 0; m_fifo_sync++; end
           end
        default: ;
      endcase
      si_li = li; bm_li = li; si_ri = ri; bm_ri = ri;
      #($urandom_range(5, 40));
      chk(si_lo === exp_lo && si_ro === exp_ro, "SI FIFO cell");
      chk(bm_lo === exp_lo && bm_ro === exp_ro, "burst-mode FIFO cell");
    end
  endtask

  // ------------------------------------------------------ aggressive chain
  task automatic run_agr();
    for (int n = 0; n < 50; n++) begin
      agr_li = 1'b1;
      #1 chk(agr_stage_ro === '1, "token enters every stage");
      #(D + 1) chk(agr_stage_ro === {1'b1, {(STAGES - 1){1'b0}}} && agr_lo, "inner stages acknowledged");
      #($urandom_range(5, 50)) agr_li = 1'b0;
      #($urandom_range(10, 100));
      chk(agr_ro === 1'b1, "last stage holds until ri");
      agr_ri = 1'b1;
      #1 chk(agr_stage_ro === '0, "last stage acknowledged");
      m_agr_tokens++;
      #($urandom_range(D + 5, 2 * D)) agr_ri = 1'b0;
      #(3 * D) chk(agr_stage_ro === '0 && !agr_lo, "chain idle");
    end
  endtask

  // -------------------------------------------------------- shuffled chain
  task automatic run_shf();
    for (int n = 0; n < 50; n++) begin
      int w;
      w = $urandom_range(5, 3 * D);
      fork
        begin
          shf_li = 1'b1;
          #1       chk(shf_stage_ro === '1 && shf_ro_n, "token enters every shuffled stage");
          #(D + 1) chk(shf_stage_ro === '0 && !shf_ro_n, "shuffled stages reset after one delay");
          #(D)     chk(shf_ro_n === 1'b1, "shuffled ro_n back high");
        end
        begin #(w) shf_li = 1'b0; end
      join
      m_shf_tokens++;
      #(D + $urandom_range(5, 50));
    end
  endtask

  // ------------------------------------------------------------------ ring
  int  ring_count [RING];
  time ring_t0;
  for (genvar i = 0; i < RING; i++) begin : g_ring
    always @(posedge ring_ro[i]) if (!rst) begin
      chk($time == ring_t0 + i * D + ring_count[i] * RING * D, "ring token on time");
      ring_count[i]++;
    end
  end

  task automatic run_ring();
    #(2 * D);
    ring_t0 = $time;
    fork
      begin ring_inject = 1'b1; #($urandom_range(5, 2 * D)) ring_inject = 1'b0; end
      #(20 * RING * D - 1);
    join
    foreach (ring_count[i]) chk(ring_count[i] == 20, "ring: every cell once per revolution");
    m_ring_revs = ring_count[RING-1];
  endtask

  // ----------------------------------------------------------- pulse chain
  int pls_count [STAGES];
  for (genvar s = 0; s < STAGES; s++) begin : g_pls
    always @(posedge pls_stage_ro[s]) pls_count[s]++;
  end

  task automatic run_pls();
    #(3 * D);
    foreach (pls_count[s]) pls_count[s] = 0;
    for (int n = 0; n < 50; n++) begin
      int w;
      w = $urandom_range(5, D - 5);
      pls_li = 1'b1;
      #1 chk(pls_stage_ro === '1, "pulse in every stage");
      #(w - 1) pls_li = 1'b0;
      #(D - w + 1) chk(pls_stage_ro === '0, "pulses end after one delay");
      #(2 * D + $urandom_range(5, 50));
    end
    foreach (pls_count[s]) chk(pls_count[s] == 50, "one pulse per stage per token");
    m_pls_tokens = pls_count[STAGES-1];
  endtask

  // --------------------------------------------------------- SI tag unit
  int tsi_len = 0;
  int tsi_buf = 0;
  initial forever begin : tsi_buffer
    @(posedge tsi_bufreq);
    tsi_buf++;
    chk(tsi_irdy && tsi_ti != '0, "SI tag: bufreq only with irdy and tag");
    #($urandom_range(5, 300)) tsi_bufack = 1'b1;
    wait (!tsi_bufreq);
    #($urandom_range(5, 300)) tsi_bufack = 1'b0;
  end
  initial forever begin : tsi_tagout
    int k;
    wait (tsi_to != '0);
    chk(tsi_to == N'(1) << tsi_len, "SI tag: steered to to[L]");
    k = tsi_len;
    #($urandom_range(5, 100)) tsi_toa[k] = 1'b1;
    wait (tsi_to == '0);
    #($urandom_range(5, 100)) tsi_toa[k] = 1'b0;
  end

  task automatic run_tsi();
    for (int n = 0; n < 60; n++) begin
      int k_in;
      k_in = $urandom_range(0, N - 1);
      wait (tsi_to == '0 && tsi_toa == '0);
      tsi_len = $urandom_range(0, N - 1);
      tsi_l = N'(1) << tsi_len;
      fork
        begin
          #($urandom_range(5, 100)) tsi_irdy = 1'b1;
          wait (tsi_irdyack);
          #($urandom_range(5, 50)) tsi_irdy = 1'b0;
          wait (!tsi_irdyack);
        end
        begin
          #($urandom_range(5, 100)) tsi_ti[k_in] = 1'b1;
          wait (tsi_tia[k_in]);
          chk(tsi_tia == N'(1) << k_in, "SI tag: acknowledge to requester");
          #($urandom_range(5, 50)) tsi_ti[k_in] = 1'b0;
          wait (!tsi_tia[k_in]);
        end
        begin
          wait (tsi_irdy && tsi_ti != '0);
          if (tsi_bufreq || tsi_bufack || tsi_to != '0 || tsi_toa != '0) m_tsi_stall++;
        end
      join
      m_tsi_tags++;
    end
    wait (!tsi_bufreq && !tsi_bufack && tsi_to == '0 && tsi_toa == '0);
    chk(tsi_buf == 60, "SI tag: one buffer request per tag");
  endtask

  // ------------------------------------------------------ pulse tag unit
  task automatic run_trp();
    #(2 * D);
    for (int n = 0; n < 60; n++) begin
      int k_in, len, w, t_buf;
      logic [N+1:0] exp;
      k_in  = $urandom_range(0, N - 1);
      len   = $urandom_range(0, N - 1);
      w     = $urandom_range(10, 80);
      t_buf = $urandom_range(w + 10, w + 200);
      trp_l = N'(1) << len;
      exp   = {2'b11, trp_l};
      #($urandom_range(5, 50)) trp_irdy = 1'b1;
      #($urandom_range(10, 50));
      trp_ti[k_in] = 1'b1;
      fork
        begin #(w) trp_ti[k_in] = 1'b0; end
        begin #(t_buf) trp_bufack = 1'b1; end
        begin
          #1           chk({trp_bufreq, trp_irdyack, trp_to} === exp, "tag unit fires");
          #(t_buf - 2) chk({trp_bufreq, trp_irdyack, trp_to} === exp, "tag unit holds");
          #2           chk({trp_bufreq, trp_irdyack, trp_to} === '0, "tag unit pulse ends on bufack");
        end
      join
      if ($urandom_range(0, 1) == 0) begin
        m_trp_irdy_first++;
        #($urandom_range(5, 100)) trp_irdy = 1'b0;
        #($urandom_range(5, 100)) trp_bufack = 1'b0;
      end else begin
        m_trp_buf_first++;
        #($urandom_range(5, 100)) trp_bufack = 1'b0;
        #1 chk({trp_bufreq, trp_irdyack, trp_to} === '0, "no second firing when rdy returns");
        #($urandom_range(5, 100)) trp_irdy = 1'b0;
      end
      #(D + $urandom_range(10, 50));
    end
  endtask

  initial begin
    #(3 * D) rst = 1'b0;
    #(3 * D);
    fork
      run_domino();
      run_c();
      run_fifo();
      run_agr();
      run_shf();
      run_ring();
      run_pls();
      run_tsi();
      run_trp();
    join
    $display("MECH domino set=%0d reset=%0d c_hold=%0d", m_dom_set, m_dom_reset, m_c_hold);
    $display("MECH fifo sync=%0d stall=%0d bm_left_first=%0d bm_right_first=%0d",
             m_fifo_sync, m_fifo_stall, m_bm_left_first, m_bm_right_first);
    $display("MECH agr_tokens=%0d shuffled_tokens=%0d pulse_tokens=%0d ring_revolutions=%0d",
             m_agr_tokens, m_shf_tokens, m_pls_tokens, m_ring_revs);
    $display("MECH si_tags=%0d si_stalls=%0d rappid_irdy_first=%0d rappid_bufack_first=%0d",
             m_tsi_tags, m_tsi_stall, m_trp_irdy_first, m_trp_buf_first);
    chk(m_dom_set > 0 && m_dom_reset > 0, "mechanism: domino set and reset");
    chk(m_c_hold > 0, "mechanism: C-element hold");
    chk(m_fifo_sync > 0 && m_fifo_stall > 0, "mechanism: FIFO synchronisation stall");
    chk(m_bm_left_first > 0 && m_bm_right_first > 0, "mechanism: both burst-mode paths");
    chk(m_agr_tokens > 0, "mechanism: token through aggressive chain");
    chk(m_shf_tokens > 0, "mechanism: token through shuffled chain");
    chk(m_ring_revs > 0, "mechanism: token round the ring");
    chk(m_pls_tokens > 0, "mechanism: pulse through pulse chain");
    chk(m_tsi_tags > 0 && m_tsi_stall > 0, "mechanism: SI tag unit stall");
    chk(m_trp_irdy_first > 0 && m_trp_buf_first > 0, "mechanism: pulse tag unit released in both orders");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
