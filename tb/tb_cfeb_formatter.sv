// tb_cfeb_formatter: feeds whole time samples (16 strip jobs) and B-word jobs
// and compares the word stream with words built here from the format: data
// words with the layer order 3,1,5,6,4,2 and the serialized y status bits,
// the CRC word (integer reference), words 98-100 from the pipeline status,
// and B-words. Also checks one word per BX with no gaps inside a sample.
module tb_cfeb_formatter;
  import cfeb_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic        job_valid = 1'b0, job_ready;
  tx_job_t     job;
  logic [7:0]  blk_tt [NBLK];
  logic        sca_full = 1'b0, lct_pipe_empty = 1'b1, lct_pipe_full = 1'b0;
  logic        l1a_pipe_full = 1'b0, ts16 = 1'b0;
  logic [3:0]  nf_sca = 4'd9, lct_pipe_cnt = 4'd0;
  logic [8:0]  l1a_pipe_cnt = 9'd2;
  logic [15:0] dout;
  logic        dout_valid;
  logic [15:0] expq[$];
  int checks = 0, failures = 0, nwords = 0, gaps = 0;
  int layer_order [6] = '{3, 1, 5, 6, 4, 2};

  always #5 clk = ~clk;
  cfeb_formatter dut (.clk, .rst_n, .flush, .job_valid, .job, .job_ready,
    .blk_tt, .sca_full, .nf_sca, .lct_pipe_cnt, .lct_pipe_empty, .lct_pipe_full,
    .l1a_pipe_cnt, .l1a_pipe_full, .ts16, .dout, .dout_valid);

  function automatic int crc_step(int c, int w);
    int d;
    d = w & 'h1fff;
    return (d ^ (d << 1) ^ (((c & 'h7ffc) >> 2) | ((c & 3) << 13)) ^
            ((c & 'h7ffc) >> 1)) & 'h7fff;
  endfunction

  function automatic logic [4:0] cnt_code(int n);
    if (n < 16) return 5'(n);
    return {1'b1, 4'((n / 8 > 15) ? 15 : n / 8)};
  endfunction

  task automatic send(input tx_job_t j);
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job = j; job_valid = 1'b1;
    @(negedge clk);
    job_valid = 1'b0;
  endtask

  // one time sample: expected words, then jobs
  task automatic sample(input logic [3:0] blk, input bit x, input bit l1ph,
                        input bit lctph, input logic [5:0] l1n);
    tx_job_t j [16];
    logic [15:0] y;
    int c;
    y = {ts16, sca_full, lctph, l1ph, blk, blk_tt[blk]};
    c = 0;
    for (int p = 0; p < 16; p++) begin
      j[p] = '0;
      j[p].pos = 4'(p); j[p].last = (p == 15); j[p].x = x; j[p].blk = blk;
      j[p].l1a_phase = l1ph; j[p].lct_phase = lctph; j[p].l1a_num = l1n;
      for (int l = 0; l < 6; l++) j[p].adc[l] = 13'($urandom);
      for (int k = 0; k < 6; k++) begin
        logic [12:0] a;
        a = j[p].adc[layer_order[k] - 1];
        expq.push_back({1'b0, x, y[p], a});
        c = crc_step(c, int'(a));
      end
    end
    expq.push_back({1'b0, 15'(c)});
    expq.push_back({4'b0111, l1a_pipe_cnt == 0, lct_pipe_empty, l1a_pipe_full,
                    lct_pipe_full, lct_pipe_cnt, nf_sca});
    expq.push_back({4'b0111, l1n, cnt_code(int'(l1a_pipe_cnt)), l1a_pipe_cnt > 32});
    expq.push_back(16'h7FFF);
    for (int p = 0; p < 16; p++) send(j[p]);
  endtask

  task automatic bwords(input logic [7:0] tt);
    tx_job_t j;
    j = '0; j.bword = 1'b1; j.tt = tt;
    for (int i = 0; i < 4; i++) expq.push_back({4'b1011, 3'b001, sca_full, tt});
    send(j);
  endtask

  // receiver
  logic prev_valid = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dout_valid) begin
      nwords++;
      checks++;
      if (expq.size() == 0 || dout != expq[0]) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", nwords, dout,
                 expq.size() ? expq[0] : 16'hxxxx);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (prev_valid && !dout_valid && expq.size() != 0) gaps++;
    prev_valid <= dout_valid;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    job = '0;
    for (int b = 0; b < NBLK; b++) blk_tt[b] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sample(4'd3, 1'b1, 1'b0, 1'b1, 6'd5);
    while (expq.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    nf_sca = 4'd7; lct_pipe_cnt = 4'd2; lct_pipe_empty = 1'b0; l1a_pipe_cnt = 9'd40;
    sca_full = 1'b1; ts16 = 1'b1;
    sample(4'd10, 1'b0, 1'b1, 1'b0, 6'd63);
    bwords(8'h04);
    bwords(8'h00);
    while (expq.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    sca_full = 1'b0; l1a_pipe_cnt = 9'd0; nf_sca = 4'd12; lct_pipe_empty = 1'b1;
    lct_pipe_cnt = 4'd0;
    sample(4'd11, 1'b1, 1'b1, 1'b1, 6'd1);
    repeat (120) @(negedge clk);
    checks++;
    if (expq.size() != 0 || nwords != 3 * 100 + 8) begin
      failures++; $display("FAIL word count %0d", nwords);
    end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL gaps inside the stream"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
