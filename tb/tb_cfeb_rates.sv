// tb_cfeb_rates: the whole design at its default parameters under trigger
// trains at the CMS Level-1 rate limits, in 8- and 16-sample readout.
//
// L1A times are drawn with $urandom and kept only if they respect the rules
// no more than 1 L1A per 3 BX, 2 per 25 BX, 3 per 100 BX and 4 per 240 BX
// (75 ns, 625 ns, 2.5 us, 6 us); each L1A has its LCT X BX earlier, and
// extra LCTs without an L1A arrive at random. Every frame is checked
// against the same sample-level reference model as the end-to-end test
// (ADC codes, x and y bits, CRC, trailer, B-words only for unsampled
// periods, DAV/MOVLP timing).
//
// On top of that the pipeline status carried in words 98 and 99 is watched:
// LCT_PIPE_FULL and L1A_PIPE_FULL must never be set, and the largest
// LCT_PIPE_CNT and L1A_PIPE_CNT seen are reported. Event sizes are counted
// in bytes: an event that shares no sample with another must be 1.6 kB
// (8 samples) or 3.2 kB (16 samples) when all its samples were recorded.
// The rate rules and the event sizes are the document's; the traffic mix,
// the LCT latency of 27 BX and the run lengths are this testbench's own.
module tb_cfeb_rates;
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
  int   ev_words [int];     // words received per event
  int   ev_ns [int];        // samples per event
  bit   ev_shared [int];    // event shares samples with another one
  int   max_lct_cnt = 0, max_l1a_cnt = 0;

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
    ev_ns[n_ev] = ns;
    for (int j = 0; j < ns; j++) begin
      rec_t r;
      hits = 0;
      // a lost sample has no x bit: every event gets its own B-words
      foreach (exp_q[i]) if (exp_q[i].ct == ct0 + j && sampled.exists(((ct0 + j) * 2) >> 4)) begin
        exp_q[i].x_exp = 1'b0;
        ev_shared[exp_q[i].ev] = 1'b1;
        ev_shared[n_ev] = 1'b1;
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
    ev_words[r.ev] = (ev_words.exists(r.ev) ? ev_words[r.ev] : 0) + fr.size();
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
    check(fr[97][9] == 1'b0 && fr[97][8] == 1'b0, "pipelines never full");
    if (int'(fr[97][7:4]) > max_lct_cnt) max_lct_cnt = int'(fr[97][7:4]);
    begin
      int c;
      c = fr[98][5] ? int'(fr[98][4:1]) * 8 : int'(fr[98][4:1]);
      if (c > max_l1a_cnt) max_l1a_cnt = c;
    end
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
    repeat (150000) @(posedge clk);
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

  // L1A train obeying the CMS rate rules; returns the last L1A time
  int acc[$];
  function automatic bit rules_ok(int c);
    int n3, n25, n100, n240;
    n3 = 0; n25 = 0; n100 = 0; n240 = 0;
    foreach (acc[i]) begin
      if (c - acc[i] < 3)   n3++;
      if (c - acc[i] < 25)  n25++;
      if (c - acc[i] < 100) n100++;
      if (c - acc[i] < 240) n240++;
    end
    return n3 < 1 && n25 < 2 && n100 < 3 && n240 < 4;
  endfunction
  task automatic train(int start, int n_l1as, output int last);
    int c;
    acc.delete();
    c = start;
    while (acc.size() < n_l1as) begin
      c += 3 + ($urandom % 40);
      if (rules_ok(c)) begin
        acc.push_back(c);
        lct_at[c - X] = 1'b1;
        l1a_at[c] = 1'b1;
      end
    end
    // extra LCTs without L1A, kept clear of the L1A windows
    for (int k = start - X; k < c; k += 20 + ($urandom % 60)) begin
      bit clash;
      clash = 0;
      foreach (acc[i]) if (k + X >= acc[i] - 2 && k + X <= acc[i] + 2) clash = 1;
      if (k > 0 && !clash) lct_at[k] = 1'b1;
    end
    last = c;
  endtask

  // ---------------- scenario ----------------
  int n_iso8 = 0, n_iso16 = 0, n_bonly = 0, bytes_total = 0;
  initial begin
    int last;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 2; mode++) begin
      ts16 = mode[0];
      do_sync_reset();
      // an isolated event first, then a train at the rate limits
      sched(16 * 20 + 6, 0);
      train(16 * 20 + 6 + T1 + X + 200, mode == 0 ? 30 : 20, last);
      wait_until(last + 10);
      drain();
    end
    check(exp_q.size() == 0, "all expected samples received");
    check(dav_exp.size() == 0 && movlp_exp.size() == 0, "all DAV/MOVLP seen");
    foreach (ev_words[e]) begin
      bytes_total += 2 * ev_words[e];
      if (!ev_shared.exists(e) && ev_words[e] == 100 * ev_ns[e]) begin
        if (ev_ns[e] == 8)  n_iso8++;
        else                n_iso16++;
      end
      if (ev_words[e] == 4 * ev_ns[e]) n_bonly++;
      if (!ev_shared.exists(e))
        check(ev_words[e] % 4 == 0 && ev_words[e] >= 4 * ev_ns[e] && ev_words[e] <= 100 * ev_ns[e],
              $sformatf("event %0d size %0d words", e, ev_words[e]));
    end
    $display("events=%0d dav=%0d movlp=%0d 1.6kB_events=%0d 3.2kB_events=%0d bword_only_events=%0d bytes=%0d max_LCT_PIPE_CNT=%0d max_L1A_PIPE_CNT=%0d bword_groups=%0d sca_full_bx=%0d",
             n_ev, n_dav, n_movlp, n_iso8, n_iso16, n_bonly, bytes_total, max_lct_cnt, max_l1a_cnt, m_bword, m_full);
    check(n_iso8 > 0, "an 8-sample event of 1.6 kB");
    check(n_iso16 > 0, "a 16-sample event of 3.2 kB");
    check(m_ovlp > 0, "overlapping events at the rate limits");
    check(max_lct_cnt <= 10, "LCT_PIPE_CNT within the coincidence window");
    check(max_l1a_cnt > 0, "L1A pipeline used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
