// sca_controller: SCA block management of the CFEB.
//
// The amplifier output of every strip is sampled into the SCA every 50 ns.
// The SCA holds 12 blocks of 8 cells; a block covers one 400 ns period. At
// each block boundary the controller takes the next sampling block from the
// pool of free blocks, first free one in the Gray-code priority
// 0,1,3,2,6,7,5,4,10,11,9,8 (so at low rate it cycles over 0,1,3,2). If no
// block is free the period is not sampled (SCA full) and its samples are
// lost. A block that finished sampling is held for HOLD_PERIODS periods
// (800 ns) waiting for an LCT, then returned to the pool.
//
// LCT: an LCT arriving at BX t refers to the sample time s = t - LCT_LATENCY.
// If s falls in cells 2..8 of a block it locks that block and the next one
// (case 1); if s falls in cell 1 it also locks the previous block (case 2).
// In 16-sample mode one more following block is locked. A locked block that
// is still to be sampled is locked at the boundary that allocates it. Each
// LCT waits in the LCT pipeline; if no L1A arrives within X +- 1 BX of it,
// its locks are removed.
//
// L1A: an L1A arriving at BX t in the window of the oldest waiting LCT is a
// coincidence. Its sample time is t - LCT_LATENCY - X; the cell it falls in
// sets a bit of that block's TRIG_TIME and starts the 8 (or 16) samples to
// digitize. For each block spanned, one entry with the cells still to be
// digitized goes to the L1A pipeline and the block is locked until the
// digitizer releases it; periods that were never sampled give B-word
// entries. A sample already queued by an earlier event is not queued again;
// it is marked OVERLAPPED instead (x=0 when transmitted). A sample already
// used by two events makes the coincidence a multiple overlap: no DAV, no
// data, a MOVLP pulse, only the TRIG_TIME bit is set. Otherwise DAV pulses.
//
// Blocks become free, and NF_SCA changes, only at block boundaries: all
// lock/release decisions take effect in step with the 400 ns cycle.
//
// Status: NF_SCA counts free blocks, LCT_PIPE_CNT blocks locked by an LCT
// and not by an L1A, l1a_lock_cnt blocks locked by L1A x LCT (the format's
// L1A_PIPE_CNT; lost periods lock no block and do not count).
//
// Timing: 'bx' counts BX since Sync Reset; Sync Reset (or rst_n) frees every
// block and starts over with block 0, cell 1, one BX later. DAV and MOVLP
// are one-cycle pulses one BX after the L1A. Entries are written to the L1A
// pipeline in the L1A's cycle.
//
// This design's own choices: the LCT latency value (27 BX), exact BX
// bookkeeping with a 16-bit counter, the lock counters per block, the
// per-cell use state that detects overlaps, and that an L1A also checks the
// second-oldest LCT when the oldest one expires in the same cycle.
module sca_controller #(
  parameter int LCT_LATENCY  = 27,   // BX from sample time to LCT arrival
  parameter int L1A_X        = 116,  // BX from LCT to L1A (window +-1)
  parameter int HOLD_PERIODS = 2,    // periods a sampled block waits for an LCT
  parameter int LCT_DEPTH    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sync_rst,
  input  logic                         lct,
  input  logic                         l1a,
  input  logic                         ts16,      // 1: 16-sample readout
  // SCA write addressing
  output logic                         sca_wr_en,
  output cfeb_pkg::blk_t               sca_wr_blk,
  output cfeb_pkg::cell_t              sca_wr_cell,
  output logic [cfeb_pkg::BXW-1:0]     bx,
  // to the L1A pipeline
  output logic [1:0]                   push_n,
  output cfeb_pkg::rd_entry_t          push_data [3],
  input  logic [8:0]                   l1a_space,
  // from the digitizer
  input  logic                         take_valid, // digitizer starts a cell
  input  cfeb_pkg::blk_t               take_blk,
  input  cfeb_pkg::cell_t              take_cell,
  output logic                         take_x,     // 0: cell is overlapped
  input  logic                         rel_valid,  // digitizer done with a block
  input  cfeb_pkg::blk_t               rel_blk,
  // status
  output logic [7:0]                   blk_tt [cfeb_pkg::NBLK],
  output logic [3:0]                   nf_sca,
  output logic                         sca_full,
  output logic [3:0]                   lct_pipe_cnt,
  output logic                         lct_pipe_empty,
  output logic                         lct_pipe_full,
  output logic [3:0]                   l1a_lock_cnt, // blocks locked by L1A x LCT
  output logic                         dav,
  output logic                         movlp,
  output logic [5:0]                   l1a_num
);
  import cfeb_pkg::*;

  localparam logic [BXW-1:0] T1 = BXW'(LCT_LATENCY);
  localparam logic [BXW-1:0] T2 = BXW'(LCT_LATENCY + L1A_X);
  localparam logic [BXW-1:0] XW = BXW'(L1A_X);
  localparam int LAW = $clog2(LCT_DEPTH);

  // ---------------- state ----------------
  logic              free_q  [NBLK];
  logic [1:0]        wait_q  [NBLK];
  logic [4:0]        lct_q   [NBLK];
  logic [4:0]        l1a_q   [NBLK];
  logic [PERW-1:0]   tag_q   [NBLK];
  logic [7:0]        tt_q    [NBLK];
  logic [1:0]        use_q   [NBLK][NCELL];
  logic              cur_valid;
  blk_t              cur_blk;

  // next-state
  logic              free_d  [NBLK];
  logic [1:0]        wait_d  [NBLK];
  logic [4:0]        lct_d   [NBLK];
  logic [4:0]        l1a_d   [NBLK];
  logic [PERW-1:0]   tag_d   [NBLK];
  logic [7:0]        tt_d    [NBLK];
  logic [1:0]        use_d   [NBLK][NCELL];

  // ---------------- timing ----------------
  logic [PERW-1:0] period, next_period;
  logic            boundary;
  assign period      = bx[BXW-1:4];
  assign next_period = period + 1'b1;
  assign boundary    = (bx[3:0] == 4'hF);

  assign sca_wr_en   = cur_valid;
  assign sca_wr_blk  = cur_blk;
  assign sca_wr_cell = bx[3:1];

  // ---------------- allocation ----------------
  logic alloc_ok;
  blk_t alloc_blk;
  always_comb begin
    alloc_ok  = 1'b0;
    alloc_blk = '0;
    for (int i = NBLK - 1; i >= 0; i--)
      if (free_q[blk_prio(i)]) begin
        alloc_ok  = 1'b1;
        alloc_blk = blk_prio(i);
      end
  end

  // block holding the samples of period p (valid data only)
  function automatic logic [NBLK:0] lookup(input logic [PERW-1:0] p);
    lookup = '0;
    for (int b = 0; b < NBLK; b++)
      if (!free_q[b] && tag_q[b] == p) lookup = {1'b1, NBLK'(1) << b};
  endfunction

  function automatic blk_t onehot_to_blk(input logic [NBLK-1:0] m);
    onehot_to_blk = '0;
    for (int b = 0; b < NBLK; b++) if (m[b]) onehot_to_blk = blk_t'(b);
  endfunction

  // ---------------- LCT pipeline ----------------
  logic [BXW-1:0]  lp_head_ts, lp_second_ts;
  logic [NBLK-1:0] lp_head_mask, lp_second_mask;
  logic            lp_head_phase, lp_second_phase;
  logic [LAW:0]    lp_count, lp_pend_n;
  logic            lp_empty, lp_full;
  logic [1:0]      lp_pop_n;
  logic            lct_push, lct_pend, lct_phase;
  logic [NBLK-1:0] lct_mask;

  lct_pipe #(.DEPTH(LCT_DEPTH)) u_lct_pipe (
    .clk, .rst_n, .flush(sync_rst),
    .push(lct_push), .push_ts(bx), .push_mask(lct_mask), .push_pend(lct_pend),
    .push_phase(lct_phase), .pop_n(lp_pop_n),
    .resolve(boundary), .resolve_blk(alloc_blk), .resolve_ok(alloc_ok),
    .head_ts(lp_head_ts), .head_mask(lp_head_mask), .head_phase(lp_head_phase),
    .second_ts(lp_second_ts), .second_mask(lp_second_mask),
    .second_phase(lp_second_phase),
    .count(lp_count), .empty(lp_empty), .full(lp_full), .pend_n(lp_pend_n)
  );

  // LCT: which blocks to lock
  logic [BXW-1:0]  s_lct;
  logic [PERW-1:0] ps_lct;
  always_comb begin
    logic [PERW-1:0] p;
    logic [NBLK:0]   lk;
    int              kmin, kmax;
    p         = '0;
    lk        = '0;
    s_lct     = bx - T1;
    ps_lct    = s_lct[BXW-1:4];
    lct_phase = ~s_lct[0];
    kmin      = (s_lct[3:1] == 3'd0) ? -1 : 0;
    kmax      = ts16 ? 2 : 1;
    lct_mask  = '0;
    lct_pend  = 1'b0;
    for (int k = -1; k <= 2; k++) begin
      if (k >= kmin && k <= kmax) begin
        p = ps_lct + PERW'(k);
        if (p == next_period) begin
          if (boundary) begin
            if (alloc_ok) lct_mask[alloc_blk] = 1'b1;
          end else lct_pend = 1'b1;
        end else begin
          lk = lookup(p);
          if (lk[NBLK]) lct_mask = lct_mask | lk[NBLK-1:0];
        end
      end
    end
  end

  // expiry and coincidence
  logic [BXW-1:0] d_head, d_second;
  logic           head_exp, head_win, second_win, match, match_second;
  logic           match_phase;
  assign d_head     = bx - lp_head_ts;
  assign d_second   = bx - lp_second_ts;
  assign head_exp   = !lp_empty && (d_head > XW + 1'b1);
  assign head_win   = !lp_empty && (d_head >= XW - 1'b1) && (d_head <= XW + 1'b1);
  assign second_win = (lp_count >= (LAW+1)'(2)) &&
                      (d_second >= XW - 1'b1) && (d_second <= XW + 1'b1);
  assign match        = l1a && (head_win || (head_exp && second_win));
  assign match_second = l1a && !head_win && head_exp && second_win;
  assign match_phase  = match_second ? lp_second_phase : lp_head_phase;

  always_comb begin
    if (match_second)       lp_pop_n = 2'd2;
    else if (match || head_exp) lp_pop_n = 2'd1;
    else                    lp_pop_n = 2'd0;
  end
  assign lct_push = lct && (!lp_full || lp_pop_n != 2'd0);

  // ---------------- L1A x LCT event ----------------
  logic [BXW-1:0]  s_l1a;
  logic [PERW-1:0] ps_l1a;
  cell_t           c_l1a;
  logic            ph_l1a;
  logic [7:0]      cm   [3];
  logic            fnd  [3];
  blk_t            fblk [3];
  logic [7:0]      newc [3];
  logic            triple, movlp_evt, room;
  logic [1:0]      n_ent;
  rd_entry_t       ent  [3];
  rd_entry_t       cand [3];
  logic            cand_v [3];
  logic [5:0]      l1a_num_next;

  assign l1a_num_next = l1a_num + 6'(l1a);

  always_comb begin
    logic [NBLK:0] lk;
    logic [1:0]    u;
    lk     = '0;
    u      = '0;
    s_l1a  = bx - T2;
    ps_l1a = s_l1a[BXW-1:4];
    c_l1a  = s_l1a[3:1];
    ph_l1a = ~s_l1a[0];
    cm[0]  = 8'hFF << c_l1a;
    cm[1]  = ts16 ? 8'hFF : ~cm[0];
    cm[2]  = ts16 ? ~cm[0] : 8'h00;
    triple = 1'b0;
    for (int k = 0; k < 3; k++) begin
      lk      = lookup(ps_l1a + PERW'(k));
      fnd[k]  = lk[NBLK] && (cm[k] != 8'h00);
      fblk[k] = onehot_to_blk(lk[NBLK-1:0]);
      newc[k] = '0;
      if (fnd[k])
        for (int c = 0; c < NCELL; c++) begin
          u = use_q[fblk[k]][c];
          if (take_valid && take_blk == fblk[k] && take_cell == cell_t'(c)) u = 2'd0;
          if (cm[k][c]) begin
            if (u == 2'd0) newc[k][c] = 1'b1;
            if (u == 2'd2) triple = 1'b1;
          end
        end
    end
    // candidate entries, one per period, then packed in order
    for (int k = 0; k < 3; k++) begin
      cand[k]           = '0;
      cand[k].l1a_phase = ph_l1a;
      cand[k].lct_phase = match_phase;
      cand[k].l1a_num   = l1a_num_next;
      cand_v[k]         = 1'b0;
      if (fnd[k] && newc[k] != 8'h00) begin
        cand[k].blk   = fblk[k];
        cand[k].cells = newc[k];
        cand_v[k]     = 1'b1;
      end else if (!fnd[k] && cm[k] != 8'h00) begin
        cand[k].bword = 1'b1;
        cand[k].cells = cm[k];
        cand[k].tt    = (k == 0) ? (8'h01 << c_l1a) : 8'h00;
        cand_v[k]     = 1'b1;
      end
    end
    n_ent  = 2'(cand_v[0]) + 2'(cand_v[1]) + 2'(cand_v[2]);
    ent[0] = cand_v[0] ? cand[0] : (cand_v[1] ? cand[1] : cand[2]);
    ent[1] = (cand_v[0] && cand_v[1]) ? cand[1] : cand[2];
    ent[2] = cand[2];
    room      = (9'(n_ent) <= l1a_space);
    movlp_evt = triple || !room;
  end

  logic event_ok;
  assign event_ok = match && !movlp_evt;
  assign push_n   = event_ok ? n_ent : 2'd0;
  assign push_data = ent;

  // ---------------- digitizer side ----------------
  assign take_x = (use_q[take_blk][take_cell] != 2'd2);

  // ---------------- next state ----------------
  always_comb begin
    for (int b = 0; b < NBLK; b++) begin
      free_d[b] = free_q[b];
      wait_d[b] = wait_q[b];
      lct_d[b]  = lct_q[b];
      l1a_d[b]  = l1a_q[b];
      tag_d[b]  = tag_q[b];
      tt_d[b]   = tt_q[b];
      for (int c = 0; c < NCELL; c++) use_d[b][c] = use_q[b][c];
    end
    // LCT locks and unlocks
    for (int b = 0; b < NBLK; b++) begin
      if (lct_push && lct_mask[b]) lct_d[b] = lct_d[b] + 1'b1;
      if (lp_pop_n != 2'd0 && lp_head_mask[b]) lct_d[b] = lct_d[b] - 1'b1;
      if (lp_pop_n == 2'd2 && lp_second_mask[b]) lct_d[b] = lct_d[b] - 1'b1;
    end
    if (boundary && alloc_ok)
      lct_d[alloc_blk] = lct_d[alloc_blk] + 5'(lp_pend_n);
    // digitizer
    if (take_valid) use_d[take_blk][take_cell] = 2'd0;
    if (rel_valid)  l1a_d[rel_blk] = l1a_d[rel_blk] - 1'b1;
    // coincidence
    if (match && fnd[0]) tt_d[fblk[0]][c_l1a] = 1'b1;
    if (event_ok)
      for (int k = 0; k < 3; k++)
        if (fnd[k]) begin
          if (newc[k] != 8'h00) l1a_d[fblk[k]] = l1a_d[fblk[k]] + 1'b1;
          for (int c = 0; c < NCELL; c++)
            if (cm[k][c]) begin
              if (newc[k][c])                   use_d[fblk[k]][c] = 2'd1;
              else if (use_d[fblk[k]][c] == 2'd1) use_d[fblk[k]][c] = 2'd2;
            end
        end
    // block boundary: age, free, allocate
    if (boundary) begin
      for (int b = 0; b < NBLK; b++) begin
        if (cur_valid && blk_t'(b) == cur_blk) wait_d[b] = 2'(HOLD_PERIODS);
        else if (wait_d[b] != 2'd0)            wait_d[b] = wait_d[b] - 1'b1;
        free_d[b] = (wait_d[b] == 2'd0) && (lct_d[b] == '0) && (l1a_d[b] == '0);
      end
      if (alloc_ok) begin
        free_d[alloc_blk] = 1'b0;
        wait_d[alloc_blk] = 2'd0;
        tag_d[alloc_blk]  = next_period;
        tt_d[alloc_blk]   = 8'h00;
        for (int c = 0; c < NCELL; c++) use_d[alloc_blk][c] = 2'd0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx        <= '1;
      cur_valid <= 1'b0;
      cur_blk   <= '0;
      l1a_num   <= '0;
      dav       <= 1'b0;
      movlp     <= 1'b0;
      for (int b = 0; b < NBLK; b++) begin
        free_q[b] <= 1'b1; wait_q[b] <= '0; lct_q[b] <= '0; l1a_q[b] <= '0;
        tag_q[b] <= '0; tt_q[b] <= '0;
        for (int c = 0; c < NCELL; c++) use_q[b][c] <= '0;
      end
    end else if (sync_rst) begin
      bx        <= '1;
      cur_valid <= 1'b0;
      cur_blk   <= '0;
      l1a_num   <= '0;
      dav       <= 1'b0;
      movlp     <= 1'b0;
      for (int b = 0; b < NBLK; b++) begin
        free_q[b] <= 1'b1; wait_q[b] <= '0; lct_q[b] <= '0; l1a_q[b] <= '0;
        tag_q[b] <= '0; tt_q[b] <= '0;
        for (int c = 0; c < NCELL; c++) use_q[b][c] <= '0;
      end
    end else begin
      bx      <= bx + 1'b1;
      l1a_num <= l1a_num_next;
      dav     <= event_ok;
      movlp   <= match && movlp_evt;
      if (boundary) begin
        cur_valid <= alloc_ok;
        cur_blk   <= alloc_blk;
      end
      for (int b = 0; b < NBLK; b++) begin
        free_q[b] <= free_d[b]; wait_q[b] <= wait_d[b]; lct_q[b] <= lct_d[b];
        l1a_q[b] <= l1a_d[b]; tag_q[b] <= tag_d[b]; tt_q[b] <= tt_d[b];
        for (int c = 0; c < NCELL; c++) use_q[b][c] <= use_d[b][c];
      end
    end
  end

  // ---------------- status ----------------
  always_comb begin
    nf_sca       = '0;
    lct_pipe_cnt = '0;
    l1a_lock_cnt = '0;
    for (int b = 0; b < NBLK; b++) begin
      blk_tt[b] = tt_q[b];
      if (free_q[b]) nf_sca = nf_sca + 1'b1;
      if (lct_q[b] != '0 && l1a_q[b] == '0) lct_pipe_cnt = lct_pipe_cnt + 1'b1;
      if (l1a_q[b] != '0) l1a_lock_cnt = l1a_lock_cnt + 1'b1;
    end
  end
  assign sca_full       = (nf_sca == 4'd0);
  assign lct_pipe_empty = (lct_pipe_cnt == 4'd0);
  assign lct_pipe_full  = (lct_pipe_cnt == 4'hF);

  // release must match an earlier lock
  a_release_locked: assert property (@(posedge clk) disable iff (!rst_n || sync_rst)
    rel_valid |-> l1a_q[rel_blk] != '0) else $error("release of an unlocked block");
endmodule
