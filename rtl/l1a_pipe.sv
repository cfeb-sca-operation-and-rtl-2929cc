// l1a_pipe: the L1A pipeline buffer of the CFEB.
//
// Each L1A x LCT coincidence queues one entry per SCA block holding samples
// of the event (two for 8-sample readout, up to three for 16 samples), plus
// entries for periods that were never sampled (sent as B-words). The
// digitizer takes entries in order. Up to three entries can be written in
// one cycle, so a whole event is queued at once. The buffer is DEPTH deep
// (256, the 8-bit range of the count in the format) and reports its fill
// level, empty and full. Writing beyond the free space is a usage error
// caught by an assertion; the controller checks 'space' first.
//
// Timing: entries written in a cycle are visible at 'head' the next cycle;
// 'pop' removes the head at the clock edge.
module l1a_pipe #(
  parameter int DEPTH = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,      // Sync Reset
  input  logic [1:0]           push_n,     // number of entries written (0..3)
  input  cfeb_pkg::rd_entry_t  push_data [3],
  input  logic                 pop,
  output cfeb_pkg::rd_entry_t  head,
  output logic                 empty,
  output logic                 full,
  output logic [$clog2(DEPTH):0] count,
  output logic [$clog2(DEPTH):0] space
);
  import cfeb_pkg::*;
  localparam int AW = $clog2(DEPTH);

  rd_entry_t     mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign space = (AW+1)'(DEPTH) - count;
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 3; i++)
      if (!flush && i < int'(push_n)) mem[wr_ptr + AW'(i)] <= push_data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wr_ptr + AW'(push_n);
      if (pop && !empty) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(push_n) - (AW+1)'(pop && !empty);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
    (AW+1)'(push_n) <= space + (AW+1)'(pop && !empty)) else $error("l1a_pipe overflow");
endmodule
