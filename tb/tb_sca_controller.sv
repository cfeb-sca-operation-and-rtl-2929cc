// tb_sca_controller: directed test of the SCA block management.
//
// Checks, against values worked out from the operating rules:
//  - after Sync Reset NF_SCA is 12, then 11, 10, 9 and the sampling blocks
//    follow the Gray-code cycle 0,1,3,2,0,...; the write cell follows the BX;
//  - an LCT locks two blocks (case 1) or three (case 2, LCT in cell 1) and
//    the locks are dropped when no L1A comes within X +- 1 BX;
//  - an L1A in the window gives DAV one BX later and queues one entry per
//    block with the right cells, phases and L1A number, and sets TRIG_TIME;
//  - a second overlapping event queues only its new cells and the shared
//    cells read back as overlapped; a third one gives MOVLP and no DAV;
//  - without releases the pool runs empty (SCA full, a period not sampled)
//    and an event in that period gets a B-word entry; releases refill it;
//  - in 16-sample mode an LCT locks three blocks and an L1A queues three.
// The testbench plays the digitizer: it answers nothing unless asked and
// releases blocks itself. Times are BX since Sync Reset (the controller's
// bx output); inputs change on the falling clock edge. Expected values for
// the two figure cases come from the document; the 27 BX LCT latency, the
// one-BX DAV delay and the B-word bookkeeping are this design's own.
module tb_sca_controller;
  import cfeb_pkg::*;
  localparam int T1 = 27;
  localparam int X  = 116;

  logic        clk = 1'b0, rst_n = 1'b0, sync_rst = 1'b0;
  logic        lct = 1'b0, l1a = 1'b0, ts16 = 1'b0;
  logic        sca_wr_en;
  blk_t        sca_wr_blk;
  cell_t       sca_wr_cell;
  logic [15:0] bx;
  logic [1:0]  push_n;
  rd_entry_t   push_data [3];
  logic        take_valid = 1'b0, take_x, rel_valid = 1'b0;
  blk_t        take_blk = '0, rel_blk = '0;
  cell_t       take_cell = '0;
  logic [7:0]  blk_tt [NBLK];
  logic [3:0]  nf_sca, lct_pipe_cnt, l1a_lock_cnt;
  logic        sca_full, lct_pipe_empty, lct_pipe_full, dav, movlp;
  logic [5:0]  l1a_num;

  always #5 clk = ~clk;
  sca_controller dut (.clk, .rst_n, .sync_rst, .lct, .l1a, .ts16,
    .sca_wr_en, .sca_wr_blk, .sca_wr_cell, .bx, .push_n, .push_data,
    .l1a_space(9'd256), .take_valid, .take_blk, .take_cell, .take_x,
    .rel_valid, .rel_blk, .blk_tt, .nf_sca, .sca_full, .lct_pipe_cnt,
    .lct_pipe_empty, .lct_pipe_full, .l1a_lock_cnt, .dav, .movlp, .l1a_num);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL bx=%0d %s", $signed(bx), what); end
  endtask

  int t;
  assign t = int'($signed(bx));
  int blk_of [int];            // period -> sampling block (-1: none)
  always @(posedge clk) if (rst_n && !sync_rst && bx[3:0] == 4'd0 && bx != 16'hFFFF)
    blk_of[t >> 4] = sca_wr_en ? int'(sca_wr_blk) : -1;

  int n_dav = 0, n_movlp = 0;
  bit seen_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (sca_full && nf_sca == 4'd0) seen_full = 1;
    if (dav) n_dav++;
    if (movlp) n_movlp++;
  end

  task automatic wait_until(int tt);
    while (t < tt) @(negedge clk);
  endtask
  task automatic pulse_lct(int at);
    wait_until(at); lct = 1'b1; @(negedge clk); lct = 1'b0;
  endtask
  // L1A at 'at'; returns what the controller queued in that cycle
  int          got_n;
  rd_entry_t   got [3];
  task automatic pulse_l1a(int at);
    wait_until(at); l1a = 1'b1;
    #1;
    got_n = int'(push_n);
    got   = push_data;
    @(negedge clk); l1a = 1'b0;
  endtask
  task automatic release_blk(int b);
    rel_valid = 1'b1; rel_blk = blk_t'(b); @(negedge clk); rel_valid = 1'b0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sync_rst = 1'b1; @(negedge clk); sync_rst = 1'b0;
    check(nf_sca == 4'd12, "NF_SCA 12 after Sync Reset");
    for (int k = 0; k < 8; k++) begin
      wait_until(16 * k + 5);
      check(sca_wr_en && sca_wr_blk == blk_t'((k % 4 == 0) ? 0 : (k % 4 == 1) ? 1 : (k % 4 == 2) ? 3 : 2),
            "Gray-code sampling block");
      check(sca_wr_cell == 3'd2, "write cell follows the BX");
      check(nf_sca == 4'((k == 0) ? 11 : (k == 1) ? 10 : 9), "NF_SCA sequence");
    end

    // case 1 LCT without L1A
    s = 16 * 10 + 6;
    pulse_lct(s + T1);
    check(lct_pipe_cnt == 4'd2 && !lct_pipe_empty, "case 1 LCT locks two blocks");
    wait_until(s + T1 + X + 1);
    check(lct_pipe_cnt == 4'd2, "locks held through the window");
    wait_until(s + T1 + X + 3);
    check(lct_pipe_cnt == 4'd0 && lct_pipe_empty, "locks dropped after the window");
    wait_until(s + T1 + X + 40);
    check(nf_sca == 4'd9, "blocks back in the pool");

    // case 1 event (Fig. 1): L1A sample one BX before the LCT sample
    p = 30; s = 16 * p + 6;
    pulse_lct(s + T1);
    pulse_l1a(s + T1 + X - 1);
    check(got_n == 2, "two entries");
    check(!got[0].bword && got[0].blk == blk_t'(blk_of[p]) && got[0].cells == 8'hFC, "first block, cells 3..8");
    check(!got[1].bword && got[1].blk == blk_t'(blk_of[p + 1]) && got[1].cells == 8'h03, "second block, cells 1..2");
    check(got[0].l1a_phase == 1'b0 && got[0].lct_phase == 1'b1, "L1A phase 0, LCT phase 1");
    check(got[0].l1a_num == 6'd1, "first L1A number");
    #1 check(dav, "DAV one BX after the L1A");
    check(blk_tt[blk_of[p]] == 8'h04, "TRIG_TIME 0000.0100");
    check(lct_pipe_cnt == 4'd0 && l1a_lock_cnt == 4'd2, "blocks moved from LCT to L1A lock");
    wait_until(t + 40);
    check(nf_sca <= 4'd8, "frozen blocks stay out of the pool");
    release_blk(blk_of[p]);
    release_blk(blk_of[p + 1]);
    wait_until(t + 40);
    check(nf_sca == 4'd9 && l1a_lock_cnt == 4'd0, "released blocks return");

    // case 2 (Fig. 2): LCT in cell 1 phase 1, L1A in cell 8 phase 0 before
    p = 60; s = 16 * p;
    pulse_lct(s + T1);
    check(lct_pipe_cnt == 4'd3, "case 2 LCT locks three blocks");
    pulse_l1a(s + T1 + X - 1);
    check(got_n == 2 && got[0].blk == blk_t'(blk_of[p - 1]) && got[0].cells == 8'h80 &&
          got[1].blk == blk_t'(blk_of[p]) && got[1].cells == 8'h7F, "case 2 entries");
    check(blk_tt[blk_of[p - 1]] == 8'h80, "TRIG_TIME 1000.0000");
    wait_until(t + 40);
    check(lct_pipe_cnt == 4'd0, "unused third block not kept by the LCT");
    release_blk(blk_of[p - 1]);
    release_blk(blk_of[p]);

    // overlapping events and a multiple overlap
    p = 100; s = 16 * p + 6;
    pulse_lct(s + T1);
    pulse_lct(s + 8 + T1);
    pulse_lct(s + 12 + T1);
    pulse_l1a(s + T1 + X - 1);
    check(got_n == 2, "event C");
    pulse_l1a(s + 8 + T1 + X - 1);
    check(got_n == 1 && got[0].blk == blk_t'(blk_of[p + 1]) && got[0].cells == 8'h3C,
          "event D queues only its new cells");
    check(blk_tt[blk_of[p]] == 8'h44, "TRIG_TIME 0100.0100");
    pulse_l1a(s + 12 + T1 + X - 1);
    check(got_n == 0, "event E queues nothing");
    #1 check(movlp && !dav, "MOVLP and no DAV");
    check(blk_tt[blk_of[p + 1]] == 8'h01, "E still sets its TRIG_TIME bit");
    take_valid = 1'b1; take_blk = blk_t'(blk_of[p]); take_cell = 3'd6; #1;
    check(take_x == 1'b0, "shared cell read as overlapped");
    take_cell = 3'd2; #1;
    check(take_x == 1'b1, "cell of one event not overlapped");
    @(negedge clk); take_valid = 1'b0;
    release_blk(blk_of[p]);
    release_blk(blk_of[p + 1]);
    release_blk(blk_of[p + 1]);

    // run the pool empty: events every 3 periods, never released
    p = 200;
    fork
      for (int k = 0; k < 10; k++) pulse_lct(16 * (p + 3 * k) + 6 + T1);
      begin
        bit got_b;
        got_b = 0;
        for (int k = 0; k < 10; k++) begin
          pulse_l1a(16 * (p + 3 * k) + 6 + T1 + X);
          if (got_n > 0 && got[0].bword) got_b = 1;
        end
        check(got_b, "B-word entry for an unsampled period");
      end
    join
    check(seen_full, "SCA_FULL seen");
    begin
      bit unsampled;
      unsampled = 0;
      foreach (blk_of[k]) if (blk_of[k] < 0) unsampled = 1;
      check(unsampled, "a period without a free block was not sampled");
    end
    // release everything the events froze
    for (int b = 0; b < NBLK; b++)
      while (dut.l1a_q[b] != 0) release_blk(b);
    wait_until(t + 64);
    check(nf_sca == 4'd9, "pool refilled after releases");
    check(n_movlp == 1, "one MOVLP");

    // 16-sample readout: one more block locked, three entries per L1A
    ts16 = 1'b1;
    p = t / 16 + 6; s = 16 * p + 6;
    pulse_lct(s + T1);
    check(lct_pipe_cnt == 4'd3, "16-sample case 1 LCT locks three blocks");
    pulse_l1a(s + T1 + X - 1);
    check(got_n == 3 && got[0].blk == blk_t'(blk_of[p]) && got[0].cells == 8'hFC &&
          got[1].blk == blk_t'(blk_of[p + 1]) && got[1].cells == 8'hFF &&
          got[2].blk == blk_t'(blk_of[p + 2]) && got[2].cells == 8'h03, "16-sample entries");
    check(got[0].l1a_num == got[2].l1a_num, "one L1A number for the whole event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
