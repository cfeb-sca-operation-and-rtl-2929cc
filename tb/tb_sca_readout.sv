// tb_sca_readout: drives L1A-pipeline entries into the digitizer and checks
// the SCA read address sequence (marked cells in order, strips in Gray-code
// order), one conversion every 6 BX, 100 BX per time sample, the T0 wait
// 16 + 6*(n-1) BX from the L1A for an entry taken while idle, the jobs handed
// to the formatter (ADC results of the right cell and strip, x from the
// controller's answer, last-strip mark), one 'take' per cell, one release
// per real block after its last conversion, and B-word jobs for missing
// periods.
module tb_sca_readout;
  import cfeb_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  rd_entry_t ent;
  logic      ent_empty, ent_pop;
  logic      take_valid, take_x = 1'b1, rel_valid, adc_conv, job_valid;
  blk_t      take_blk, rel_blk, sca_rd_blk;
  cell_t     take_cell, sca_rd_cell;
  logic [3:0] sca_rd_strip;
  adc_t      adc_data [NLAYER];
  tx_job_t   job;
  logic      job_ready = 1'b1;

  always #5 clk = ~clk;
  sca_readout dut (.clk, .rst_n, .flush, .ent, .ent_empty, .ent_pop,
    .take_valid, .take_blk, .take_cell, .take_x, .rel_valid, .rel_blk,
    .sca_rd_blk, .sca_rd_cell, .sca_rd_strip, .adc_conv, .adc_data,
    .job_valid, .job, .job_ready);

  int checks = 0, failures = 0, t = 0;
  always @(posedge clk) t <= t + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d %s", t, what); end
  endtask

  function automatic adc_t code(int blk, int cel, int strip, int l);
    return 13'((blk * 128 + cel * 16 + strip) * 7 + l);
  endfunction
  int strip_order [16] = '{0, 1, 3, 2, 6, 7, 5, 4, 12, 13, 15, 14, 10, 11, 9, 8};

  // entry source
  rd_entry_t q[$];
  always @(negedge clk) begin
    #1;
    ent_empty = (q.size() == 0);
    ent       = q.size() ? q[0] : '0;
  end
  always @(posedge clk) if (rst_n && ent_pop) begin
    check(q.size() > 0, "pop of a non-empty pipe");
    if (q.size()) void'(q.pop_front());
  end

  // ADC model: result 2 BX after the start, held
  int   a_blk, a_cell, a_strip, a_dly = 0;
  always @(posedge clk) begin
    if (adc_conv) begin
      a_blk <= sca_rd_blk; a_cell <= sca_rd_cell; a_strip <= sca_rd_strip; a_dly <= 2;
    end else if (a_dly > 0) begin
      a_dly <= a_dly - 1;
      if (a_dly == 1) for (int l = 0; l < 6; l++) adc_data[l] <= code(a_blk, a_cell, a_strip, l);
    end
  end

  // expected jobs
  typedef struct { bit bw; int blk; int cel; int pos; logic [7:0] tt; } ej_t;
  ej_t ejq[$];
  typedef struct { int blk; int cel; } tk_t;
  tk_t tkq[$];
  int  relq[$];
  bit  xs[$];
  int  last_conv = -1000, conv_in_sample = 0, first_conv_t = -1;
  int  sample_starts[$];
  bit  bp = 0;      // back-pressure phase

  always @(posedge clk) if (rst_n) begin
    if (take_valid) begin
      check(tkq.size() > 0 && tkq[0].blk == take_blk && tkq[0].cel == take_cell, "take of the expected cell");
      if (tkq.size()) void'(tkq.pop_front());
      xs.push_back(take_x);
    end
    if (adc_conv) begin
      if (first_conv_t < 0) first_conv_t = t;
      if (sca_rd_strip == 4'd0) sample_starts.push_back(t);
      else if (!bp) check(t - last_conv == 6, "one conversion every 6 BX");
      last_conv = t;
    end
    if (job_valid) begin
      ej_t e;
      check(ejq.size() > 0, "job expected");
      if (ejq.size()) begin
        e = ejq.pop_front();
        check(job.bword == e.bw, "job kind");
        if (e.bw) check(job.tt == e.tt, "B-word TRIG_TIME");
        else begin
          check(job.pos == 4'(e.pos) && job.last == (e.pos == 15) && job.blk == 4'(e.blk), "job position");
          for (int l = 0; l < 6; l++)
            check(job.adc[l] == code(e.blk, e.cel, strip_order[e.pos], l), "job ADC data");
          check(xs.size() > 0 && job.x == xs[$], "job x from take");
        end
      end
    end
    if (rel_valid) begin
      check(relq.size() > 0 && relq[0] == rel_blk, "release of the finished block");
      check(ejq.size() == 0 || ejq[0].blk != rel_blk || ejq[0].bw, "release after the last conversion");
      if (relq.size()) void'(relq.pop_front());
    end
  end

  task automatic add(bit bw, int blk, logic [7:0] cells, logic [7:0] tt);
    rd_entry_t e;
    e = '0; e.bword = bw; e.blk = 4'(blk); e.cells = cells; e.tt = tt;
    e.l1a_num = 6'(blk);
    q.push_back(e);
    for (int c = 0; c < 8; c++) if (cells[c]) begin
      if (bw) ejq.push_back('{1, -1, c, 0, tt});
      else begin
        tkq.push_back('{blk, c});
        for (int p = 0; p < 16; p++) ejq.push_back('{0, blk, c, p, 8'h00});
      end
    end
    if (!bw) relq.push_back(blk);
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) take_x = $urandom_range(0, 1);

  initial begin
    int tp;
    foreach (adc_data[l]) adc_data[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // event: first block cells 4..8, second block cells 1..3, then a lost period
    tp = t;
    add(0, 5, 8'hF8, 8'h00);
    add(0, 7, 8'h07, 8'h00);
    add(1, 0, 8'h18, 8'h10);
    while (ejq.size() || q.size()) @(negedge clk);
    check(first_conv_t - (tp - 1) == 16 + 6 * 3, $sformatf("T0 wait %0d", first_conv_t - (tp - 1)));
    for (int i = 1; i < sample_starts.size(); i++)
      check(sample_starts[i] - sample_starts[i-1] == 100, "100 BX per time sample");
    check(sample_starts.size() == 8, "eight samples");
    repeat (20) @(negedge clk);
    // from idle: B-words only, then a block starting at cell 1 with back-pressure
    bp = 1;
    add(1, 0, 8'h01, 8'h01);
    add(0, 2, 8'h01, 8'h00);
    repeat (40) @(negedge clk);
    job_ready = 1'b0;
    repeat (15) @(negedge clk);
    job_ready = 1'b1;
    while (ejq.size() || q.size()) @(negedge clk);
    repeat (20) @(negedge clk);
    check(relq.size() == 0 && tkq.size() == 0, "all takes and releases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
