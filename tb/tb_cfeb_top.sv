// tb_cfeb_top: end-to-end test of the CFEB SCA controller and readout at
// its default parameters.
//
// A behavioural SCA + flash ADC model stores, for every cell, the 50 ns
// interval it was written in and returns a code derived from layer, strip
// and that interval. The testbench keeps its own sample-level model of the
// expected readout: every L1A paired with an LCT asks for the 8 (or 16)
// samples starting at the L1A's sample time; a sample already pending for
// an earlier event is not sent again but marks that earlier one with x=0;
// a sample pending twice makes the new L1A a multiple overlap (MOVLP, no
// DAV). Samples of a period that was never recorded are not shared: each
// event gets its own B-words for them. Every received 100-word frame or 4-word B-word group is checked
// against the next expected sample: ADC codes, x and y bits, CRC (computed
// here with integer arithmetic), trailer words, TRIG_TIME bit of the event,
// and, for B-words, that the period was indeed never sampled.
//
// Scenario: Sync Reset and the NF_SCA / Gray-code block sequence; an LCT
// without L1A whose locks expire; a case-1 event (Fig. 1 timing) with the
// T0 latency and 100 BX per sample checked; a case-2 event; two overlapping
// events plus a third one making a multiple overlap; a burst that runs the
// SCA full and produces B-words; a second Sync Reset and a 16-sample event.
// Each of these mechanisms is counted and must occur.
module tb_cfeb_top;
  localparam int T1 = 27;
  localparam int X  = 116;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        sync_rst = 1'b0;
  logic        lct = 1'b0, l1a = 1'b0, ts16 = 1'b0;
  logic        sca_wr_en;
  logic [3:0]  sca_wr_blk, sca_rd_blk, sca_rd_strip;
  logic [2:0]  sca_wr_cell, sca_rd_cell;
  logic        adc_conv;
  logic [12:0] adc_data [6];
  logic [15:0] dmb_data;
  logic        dmb_valid, dav, movlp, sca_full;
  logic [3:0]  nf_sca;

  always #5 clk = ~clk;

  cfeb_top dut (
    .clk, .rst_n, .sync_rst, .lct, .l1a, .ts16,
    .sca_wr_en, .sca_wr_blk, .sca_wr_cell,
    .sca_rd_blk, .sca_rd_cell, .sca_rd_strip, .adc_conv, .adc_data,
    .dmb_data, .dmb_valid, .dav, .movlp, .nf_sca, .sca_full
  );

  int t = -1000;   // BX since Sync Reset
  sca_adc_model u_model (
    .clk, .t_bx(t), .sca_wr_en, .sca_wr_blk, .sca_wr_cell,
    .sca_rd_blk, .sca_rd_cell, .sca_rd_strip, .adc_conv, .adc_data
  );

  always @(posedge clk) t <= sync_rst ? -1 : t + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0d: %s", t, what);
    end
  endtask

  // ---------------- reference helpers ----------------
  function automatic logic [12:0] adc_code(int layer, int strip, int ct);
    int v;
    v = (ct * 97) ^ (strip << 7) ^ (layer << 10) ^ (ct >>> 5);
    return 13'(v);
  endfunction
  function automatic int crc_step(int crc, int d);
    d = d & 'h1fff;
    return (d ^ (d << 1) ^ (((crc & 'h7ffc) >> 2) | ((crc & 3) << 13)) ^
            ((crc & 'h7ffc) >> 1)) & 'h7fff;
  endfunction
  int layer_order [6] = '{3, 1, 5, 6, 4, 2};
  int strip_order [16] = '{0, 1, 3, 2, 6, 7, 5, 4, 12, 13, 15, 14, 10, 11, 9, 8};

  // ---------------- expected samples ----------------
  typedef struct {
    int ct;        // cell time of the sample
    int ev;        // event number
    int l1a_num;
    bit l1a_ph;
    bit first_blk; // sample lies in the block of the L1A cell
    int cl;        // L1A cell index 0..7
    bit x_exp;
    bit ts16;
    int l1a_t;
    int j;         // sample index within the event
  } rec_t;
  rec_t exp_q[$];

  bit   lct_at [int];
  bit   l1a_at [int];
  bit   sampled [int];     // period -> was sampled
  int   n_l1a = 0, n_ev = 0;
  int   dav_exp[$], movlp_exp[$];
  int   n_dav = 0, n_movlp = 0;

  // mechanism counters
  int m_nf_seq = 0, m_gray = 0, m_expire = 0, m_case1 = 0, m_case2 = 0;
  int m_ovlp = 0, m_movlp = 0, m_bword = 0, m_full = 0, m_ts16 = 0;
  int m_sync = 0, m_tt2 = 0, m_t0 = 0, m_pend = 0;

  function automatic void sched(int s_lct, int dl);
    lct_at[s_lct + T1] = 1'b1;
    l1a_at[s_lct + T1 + X + dl] = 1'b1;
  endfunction

  // L1A paired with an LCT at time tl: reference decision
  function automatic void on_l1a(int tl);
    int sl, ns, ct0, hits;
    bit triple;
    sl  = tl - T1 - X;
    ns  = ts16 ? 16 : 8;
    ct0 = sl >>> 1;
    triple = 0;
    for (int j = 0; j < ns; j++)
      foreach (exp_q[i]) if (exp_q[i].ct == ct0 + j && !exp_q[i].x_exp &&
                             sampled.exists(((ct0 + j) * 2) >> 4)) triple = 1;
    if (triple) begin
      movlp_exp.push_back(tl + 1);
      return;
    end
    dav_exp.push_back(tl + 1);
    n_ev++;
    for (int j = 0; j < ns; j++) begin
      rec_t r;
      hits = 0;
      // a lost sample has no x bit: every event gets its own B-words
      foreach (exp_q[i]) if (exp_q[i].ct == ct0 + j && sampled.exists(((ct0 + j) * 2) >> 4)) begin
        exp_q[i].x_exp = 1'b0;
        hits++;
      end
      if (hits == 0) begin
        r.ct = ct0 + j; r.ev = n_ev; r.l1a_num = n_l1a; r.l1a_ph = ~sl[0];
        r.cl = (sl >> 1) & 7;
        r.first_blk = (((ct0 + j) * 2) >> 4) == (sl >> 4);
        r.x_exp = 1'b1; r.ts16 = ts16; r.l1a_t = tl; r.j = j;
        exp_q.push_back(r);
      end
    end
  endfunction

  // ---------------- stimulus driver ----------------
  always @(negedge clk) begin
    lct <= lct_at.exists(t) && !sync_rst;
    l1a <= l1a_at.exists(t) && !sync_rst;
    if (l1a_at.exists(t) && !sync_rst) begin
      n_l1a++;
      on_l1a(t);
    end
  end

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n && !sync_rst && t >= 0) begin
    if (sca_wr_en) sampled[t >> 4] = 1'b1;
    if (sca_full) m_full++;
    if (dav) begin
      n_dav++;
      check(dav_exp.size() > 0 && dav_exp[0] == t, "DAV at expected BX");
      if (dav_exp.size() > 0) void'(dav_exp.pop_front());
    end
    if (movlp) begin
      n_movlp++;
      check(movlp_exp.size() > 0 && movlp_exp[0] == t, "MOVLP at expected BX");
      if (movlp_exp.size() > 0) void'(movlp_exp.pop_front());
      m_movlp++;
    end
  end

  // ---------------- frame receiver ----------------
  logic [15:0] fr[$];
  int          fr_t0;
  int          last_frame_t = 0, last_frame_ev = -1, last_frame_j = -1;

  task automatic check_frame();
    rec_t r;
    int   crc, exp_adc, layer;
    logic [15:0] y;
    bit   ycons;
    if (exp_q.size() == 0) begin
      check(0, "unexpected frame");
      return;
    end
    r = exp_q.pop_front();
    if (fr.size() == 4) begin
      m_bword++;
      for (int i = 0; i < 4; i++) begin
        check(fr[i][15:9] == 7'b1011001, "B-word header");
        check(fr[i][7:0] == (r.first_blk ? 8'(1 << r.cl) : 8'h00), "B-word TRIG_TIME");
      end
      check(!sampled.exists((r.ct * 2) >> 4), "B-words only for an unsampled period");
      return;
    end
    crc = 0; y = '0; ycons = 1;
    for (int i = 0; i < 96; i++) begin
      layer   = layer_order[i % 6];
      exp_adc = adc_code(layer, strip_order[i / 6], r.ct);
      if (fr[i][12:0] != exp_adc || fr[i][15] != 1'b0 || fr[i][14] != r.x_exp) begin
        check(0, $sformatf("data word %0d of ct %0d: %h", i, r.ct, fr[i]));
        return;
      end
      if (i % 6 == 0) y[i / 6] = fr[i][13];
      else if (i / 6 != 14 && fr[i][13] != y[i / 6]) ycons = 0;
      crc = crc_step(crc, fr[i]);
    end
    check(1, "data words");
    check(ycons, "y bit constant within a strip");
    if (!r.x_exp) m_ovlp++;
    check(y[15] == r.ts16, "TS_FLAG");
    check(y[12] == r.l1a_ph, "L1A_PHASE");
    if (r.first_blk) check(y[r.cl] == 1'b1, "TRIG_TIME bit of the L1A cell");
    if (r.first_blk && y[7:0] == 8'h44) m_tt2++;
    if (r.ts16) m_ts16++;
    check(fr[96] == {1'b0, 15'(crc)}, "CRC word");
    check(fr[97][15:12] == 4'b0111 && fr[97][3:0] <= 4'd12, "word 98");
    check(fr[98][15:12] == 4'b0111 && fr[98][11:6] == 6'(r.l1a_num), "word 99");
    check(fr[99] == 16'h7FFF, "word 100");
    // the block in work counts in L1A_PIPE_CNT until its last sample is done
    if (r.j == 0)
      check(fr[97][11] == 1'b0 && fr[98][5:1] != 5'd0, "L1A pipe counts the block in work");
    // timing: first frame of an event taken from idle, then 100 BX per sample
    if (r.ev == 1 && r.j == 0) begin
      check(fr_t0 - r.l1a_t == 16 + 6 * r.cl + 7, $sformatf("T0 latency %0d", fr_t0 - r.l1a_t));
      m_t0++;
    end
    if (r.ev == last_frame_ev && r.j == last_frame_j + 1 && r.ev == 1)
      check(fr_t0 - last_frame_t == 100, "100 BX per time sample");
    last_frame_t = fr_t0; last_frame_ev = r.ev; last_frame_j = r.j;
  endtask

  always @(posedge clk) if (rst_n && !sync_rst && dmb_valid) begin
    if (fr.size() == 0) fr_t0 = t;
    fr.push_back(dmb_data);
    if ((fr[0][15] && fr.size() == 4) || (!fr[0][15] && fr.size() == 100)) begin
      check_frame();
      fr.delete();
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_sync_reset();
    @(negedge clk) sync_rst = 1'b1;
    @(negedge clk) sync_rst = 1'b0;
    sampled.delete();
    lct_at.delete();
    l1a_at.delete();
    n_l1a = 0;
    m_sync++;
  endtask

  task automatic wait_until(int tt);
    while (t < tt) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic drain();
    int quiet;
    quiet = 0;
    while (quiet < 300) begin
      @(posedge clk);
      if (exp_q.size() == 0 && !dmb_valid) quiet++; else quiet = 0;
    end
  endtask

  // ---------------- scenario ----------------
  int nf_min;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_sync_reset();
    // Sync Reset: NF_SCA 12 for one BX, then 11, 10, 9; blocks 0,1,3,2,0,...
    #1;
    check(nf_sca == 4'd12, "NF_SCA 12 right after Sync Reset");
    check(dut.u_ctrl.bx == 16'hFFFF, "controller BX counter restarted");
    for (int p = 0; p < 8; p++) begin
      wait_until(16 * p);
      check(sca_wr_en && sca_wr_blk == 4'(p % 4 == 0 ? 0 : p % 4 == 1 ? 1 : p % 4 == 2 ? 3 : 2),
            $sformatf("Gray-code block for period %0d", p));
      check(nf_sca == 4'(p == 0 ? 11 : p == 1 ? 10 : 9), $sformatf("NF_SCA in period %0d", p));
    end
    m_nf_seq++; m_gray++;

    // LCT without L1A: blocks locked, released after X+1 BX
    lct_at[166 + T1] = 1'b1;
    nf_min = 12;
    while (t < 166 + T1 + X) begin
      @(posedge clk); #1;
      if (nf_sca < nf_min) nf_min = nf_sca;
    end
    check(nf_min <= 4'd8, "LCT locks two blocks");
    wait_until(166 + T1 + X + 64);
    check(nf_sca == 4'd9, "LCT locks released after the window");
    if (nf_min <= 8 && nf_sca == 9) m_expire++;

    // case 1 (Fig. 1): LCT in cell 4 phase 1, L1A one BX earlier (cell 3 phase 0)
    sched(16 * 30 + 6, -1); m_case1++;
    wait_until(16 * 30 + 6 + T1 + X + 10);
    drain();
    // case 2 (Fig. 2): LCT in cell 1 phase 1, L1A in cell 8 phase 0 before
    sched(16 * (t / 16 + 4), -1); m_case2++;
    wait_until(t + T1 + X + 80);
    drain();
    // overlap: second L1A 200 ns after the first, third one 300 ns after
    begin
      int s0;
      s0 = 16 * (t / 16 + 4) + 6;
      sched(s0, -1);
      sched(s0 + 8, -1);
      sched(s0 + 12, -1);
    end
    wait_until(t + T1 + X + 80);
    drain();
    // burst: runs out of free SCA blocks
    begin
      int s0;
      s0 = 16 * (t / 16 + 4) + 6;
      for (int k = 0; k < 10; k++) sched(s0 + 48 * k, 0);
    end
    wait_until(t + T1 + X + 600);
    drain();
    // Sync Reset again, then 16-sample readout; the LCT asks for a block not
    // yet allocated
    ts16 = 1'b1;
    do_sync_reset();
    sched(16 * 30 + 2, 0);
    begin
      int ta;
      ta = 16 * 30 + 2 + T1;
      wait_until(ta);
      if (dut.u_ctrl.lct_pend) m_pend++;
    end
    wait_until(16 * 30 + 2 + T1 + X + 10);
    drain();

    check(exp_q.size() == 0, "all expected samples received");
    check(dav_exp.size() == 0 && movlp_exp.size() == 0, "all DAV/MOVLP seen");
    check(n_dav == 15, $sformatf("DAV count %0d", n_dav));
    check(n_movlp == 1, "one multiple overlap");
    $display("mechanisms: nf_seq=%0d gray=%0d lct_expire=%0d case1=%0d case2=%0d overlap_frames=%0d tt_two_bits=%0d movlp=%0d bword_groups=%0d sca_full_bx=%0d ts16_frames=%0d sync_reset=%0d t0=%0d pending_lock=%0d",
             m_nf_seq, m_gray, m_expire, m_case1, m_case2, m_ovlp, m_tt2, m_movlp,
             m_bword, m_full, m_ts16, m_sync, m_t0, m_pend);
    check(m_nf_seq > 0, "NF_SCA sequence seen");
    check(m_gray > 0, "Gray-code allocation seen");
    check(m_expire > 0, "LCT expiry seen");
    check(m_case1 > 0 && m_case2 > 0, "both LCT cases");
    check(m_ovlp > 0, "overlapped samples seen");
    check(m_tt2 > 0, "TRIG_TIME with two bits seen");
    check(m_movlp > 0, "multiple overlap seen");
    check(m_bword > 0, "B-words seen");
    check(m_full > 0, "SCA full seen");
    check(m_ts16 == 16, "16-sample event");
    check(m_sync == 2, "two Sync Resets");
    check(m_t0 > 0, "T0 latency checked");
    check(m_pend > 0, "lock of a not yet allocated block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
