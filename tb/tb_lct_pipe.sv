// tb_lct_pipe: random pushes, single and double pops and block-boundary
// resolves against a queue model. Checks the two oldest entries, count,
// empty/full, the number of pending entries, that a resolve adds the named
// block to every pending entry (or only clears 'pend' when no block was
// allocated), and that a push into a full buffer is dropped.
// Stimulus changes on the falling edge; the model is updated at the rising
// edge. The 16 depth is the format's; pending entries, double pops and the
// drop-when-full rule are this design's own.
module tb_lct_pipe;
  import cfeb_pkg::*;
  typedef struct { logic [15:0] ts; logic [11:0] mask; bit pend; bit ph; } e_t;

  logic        clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic        push = 1'b0, push_pend = 1'b0, push_phase = 1'b0;
  logic [15:0] push_ts = '0;
  logic [11:0] push_mask = '0;
  logic [1:0]  pop_n = '0;
  logic        resolve = 1'b0, resolve_ok = 1'b0;
  logic [3:0]  resolve_blk = '0;
  logic [15:0] head_ts, second_ts;
  logic [11:0] head_mask, second_mask;
  logic        head_phase, second_phase, empty, full;
  logic [4:0]  count, pend_n;
  e_t model[$];
  int checks = 0, failures = 0, drops = 0, resolves = 0;

  always #5 clk = ~clk;
  lct_pipe dut (.clk, .rst_n, .flush, .push, .push_ts, .push_mask, .push_pend,
                .push_phase, .pop_n, .resolve, .resolve_blk, .resolve_ok,
                .head_ts, .head_mask, .head_phase, .second_ts, .second_mask,
                .second_phase, .count, .empty, .full, .pend_n);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np, npend, dp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // compare
      npend = 0;
      foreach (model[k]) if (model[k].pend) npend++;
      check(count == 5'(model.size()), "count");
      check(empty == (model.size() == 0) && full == (model.size() == 16), "flags");
      check(pend_n == 5'(npend), "pend_n");
      if (model.size() > 0)
        check(head_ts == model[0].ts && head_mask == model[0].mask &&
              head_phase == model[0].ph, "head");
      if (model.size() > 1)
        check(second_ts == model[1].ts && second_mask == model[1].mask &&
              second_phase == model[1].ph, "second");
      // drive
      push        = ($urandom_range(0, 2) != 0) || (i > 4000 && i < 4040);
      push_ts     = 16'($urandom);
      push_mask   = 12'($urandom);
      push_pend   = $urandom_range(0, 1);
      push_phase  = $urandom_range(0, 1);
      pop_n       = (i > 4000 && i < 4040) ? 2'd0 : 2'($urandom_range(0, 2));
      resolve     = ($urandom_range(0, 3) == 0);
      resolve_ok  = $urandom_range(0, 3) != 0;
      resolve_blk = 4'($urandom_range(0, 11));
      // model
      if (resolve) begin
        foreach (model[k]) if (model[k].pend) begin
          model[k].pend = 0;
          if (resolve_ok) model[k].mask = model[k].mask | (12'd1 << resolve_blk);
        end
        resolves++;
      end
      dp = (int'(pop_n) > model.size()) ? model.size() : int'(pop_n);
      for (int k = 0; k < dp; k++) void'(model.pop_front());
      if (push) begin
        if (model.size() < 16) model.push_back('{push_ts, push_mask, push_pend, push_phase});
        else drops++;
      end
    end
    check(drops > 0, "pushes into a full buffer were dropped");
    @(negedge clk); push = 0; pop_n = 0; resolve = 0; flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    check(empty && pend_n == 0, "Sync Reset empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
