// tb_l1a_pipe: random multi-entry writes (0..3 per cycle) and reads against
// a queue model; checks order, head, count, space, empty and full, a fill to
// the full 256 entries, and that Sync Reset empties it.
// Stimulus changes and outputs are compared on the falling edge, half a
// cycle after each rising edge, so an entry written in one cycle must be at the head the
// next. The 256 depth is the format's; the three-writes-per-cycle port is
// this design's own.
module tb_l1a_pipe;
  import cfeb_pkg::*;
  logic      clk = 1'b0, rst_n = 1'b0, flush = 1'b0, pop = 1'b0;
  logic [1:0] push_n = '0;
  rd_entry_t push_data [3];
  rd_entry_t head;
  logic      empty, full;
  logic [8:0] count, space;
  rd_entry_t model[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  l1a_pipe dut (.clk, .rst_n, .flush, .push_n, .push_data, .pop, .head,
                .empty, .full, .count, .space);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic rd_entry_t rnd_entry();
    rd_entry_t e;
    e = rd_entry_t'({$urandom, $urandom});
    return e;
  endfunction

  task automatic step(int n, bit p);
    @(negedge clk);
    check(count == 9'(model.size()), "count");
    check(space == 9'(256 - model.size()), "space");
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == 256), "full");
    if (model.size() > 0) check(head == model[0], "head");
    if (n > 256 - model.size() + ((p && model.size() > 0) ? 1 : 0))
      n = 256 - model.size() + ((p && model.size() > 0) ? 1 : 0);
    push_n = 2'(n);
    pop    = p;
    for (int i = 0; i < 3; i++) push_data[i] = rnd_entry();
    if (p && model.size() > 0) void'(model.pop_front());
    for (int i = 0; i < n; i++) model.push_back(push_data[i]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) push_data[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 3), ($urandom_range(0, 2) != 0));
    for (int i = 0; i < 150; i++) step(3, 1'b0);   // fill up
    check(full, "reaches full");
    for (int i = 0; i < 300; i++) step(0, 1'b1);   // drain
    check(empty, "drains");
    for (int i = 0; i < 10; i++) step(3, 1'b0);
    @(negedge clk); push_n = '0; pop = 1'b0; flush = 1'b1;
    @(negedge clk); flush = 1'b0; model.delete();
    check(empty && count == 0, "Sync Reset empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
