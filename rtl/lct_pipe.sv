// lct_pipe: the LCT pipeline buffer of the CFEB.
//
// Every accepted LCT leaves one entry here until an L1A arrives in its
// coincidence window or the window closes. An entry holds the BX time of
// arrival, the mask of SCA blocks the LCT locked, the LCT phase with respect
// to the 50 ns SCA clock, and a 'pend' flag: the LCT also asked for the
// block that will sample the next 400 ns period, which is not chosen yet.
// At the next block boundary the controller names that block with
// 'resolve'; it is then added to the mask of every pending entry, and
// 'pend_n' tells the controller how many locks that adds.
//
// The buffer is a circular register file of DEPTH entries so that pending
// entries can be updated in place. Entries leave in arrival order, which is
// also the order in which their L1A windows close. 'head' and 'second' show
// the two oldest entries; up to two can be removed in one cycle (an
// expired head together with a matched second entry). Pushing into a full buffer drops the LCT (the
// controller does not lock anything for it).
module lct_pipe #(
  parameter int DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,     // Sync Reset
  input  logic                        push,
  input  logic [cfeb_pkg::BXW-1:0]    push_ts,
  input  logic [cfeb_pkg::NBLK-1:0]   push_mask,
  input  logic                        push_pend,
  input  logic                        push_phase,
  input  logic [1:0]                  pop_n,     // entries removed (0..2)
  input  logic                        resolve,
  input  cfeb_pkg::blk_t              resolve_blk,
  input  logic                        resolve_ok, // a block was allocated
  output logic [cfeb_pkg::BXW-1:0]    head_ts,
  output logic [cfeb_pkg::NBLK-1:0]   head_mask,
  output logic                        head_phase,
  output logic [cfeb_pkg::BXW-1:0]    second_ts,
  output logic [cfeb_pkg::NBLK-1:0]   second_mask,
  output logic                        second_phase,
  output logic [$clog2(DEPTH):0]      count,
  output logic                        empty,
  output logic                        full,
  output logic [$clog2(DEPTH):0]      pend_n
);
  import cfeb_pkg::*;
  localparam int AW = $clog2(DEPTH);

  logic [BXW-1:0]  ts   [DEPTH];
  logic [NBLK-1:0] mask [DEPTH];
  logic            pend [DEPTH];
  logic            ph   [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic            do_push;
  logic [1:0]      do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = ((AW+1)'(pop_n) > count) ? count[1:0] : pop_n;
  assign do_push = push && (!full || do_pop != 2'd0);

  assign head_ts      = ts[rd_ptr];
  assign head_mask    = mask[rd_ptr];
  assign head_phase   = ph[rd_ptr];
  assign second_ts    = ts[rd_ptr + 1'b1];
  assign second_mask  = mask[rd_ptr + 1'b1];
  assign second_phase = ph[rd_ptr + 1'b1];

  always_comb begin
    pend_n = '0;
    for (int i = 0; i < DEPTH; i++)
      if (pend[i]) pend_n = pend_n + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        ts[i] <= '0; mask[i] <= '0; pend[i] <= 1'b0; ph[i] <= 1'b0;
      end
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) pend[i] <= 1'b0;
    end else begin
      if (resolve)
        for (int i = 0; i < DEPTH; i++)
          if (pend[i]) begin
            pend[i] <= 1'b0;
            if (resolve_ok) mask[i][resolve_blk] <= 1'b1;
          end
      if (do_pop != 2'd0) begin
        rd_ptr       <= rd_ptr + AW'(do_pop);
        pend[rd_ptr] <= 1'b0;
        if (do_pop == 2'd2) pend[rd_ptr + 1'b1] <= 1'b0;
      end
      if (do_push) begin
        ts[wr_ptr]   <= push_ts;
        mask[wr_ptr] <= push_mask;
        pend[wr_ptr] <= push_pend;
        ph[wr_ptr]   <= push_phase;
        wr_ptr       <= wr_ptr + 1'b1;
      end
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
