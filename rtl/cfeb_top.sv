// cfeb_top: SCA control and readout logic of a cathode front-end board.
//
// The board samples 96 strip signals (6 layers x 16 strips) into switched
// capacitor arrays every 50 ns. Trigger primitives (LCT) lock the SCA blocks
// that hold a possible track; a level-1 accept (L1A) arriving X +- 1 BX after
// an LCT freezes them, and the frozen cells are digitized by six flash ADCs
// and pushed to the DMB as 100-word frames per time sample (or 4 B-words
// for a sample that was never recorded).
//
//   sca_controller  block pool, Gray-code allocation, LCT/L1A locks, DAV,
//                   MOVLP, overlap marking, TRIG_TIME, NF_SCA
//   l1a_pipe        L1A pipeline: blocks waiting for digitization
//   sca_readout     SCA read addressing, ADC conversions, block release
//   cfeb_formatter  word stream with CRC, trailer words and B-words
//
// Interface: all signals are synchronous to the 40 MHz (25 ns) clock. lct
// and l1a are one-BX pulses; ts16 selects 16-sample readout. The SCA chips
// and ADCs are outside: the write address (sca_wr_*) says which block and
// cell samples in the current BX; the read address (sca_rd_*) with adc_conv
// starts a conversion whose result must be on adc_data 5 BX later.
// dmb_data/dmb_valid carry one 16-bit word per BX; dav and movlp are one-BX
// pulses one BX after the L1A.
//
// The behaviour (block locking, coincidence window, digitization overhead,
// word format) follows the CFEB-SCA operation description. The split into
// these modules, the one-BX delay of DAV and MOVLP, the 27 BX LCT latency
// and the trailer's L1A_PIPE_CNT counting locked blocks (not queue entries)
// are this design's choices.
module cfeb_top #(
  parameter int LCT_LATENCY = 27,
  parameter int L1A_X       = 116,
  parameter int L1A_DEPTH   = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sync_rst,
  input  logic                 lct,
  input  logic                 l1a,
  input  logic                 ts16,
  output logic                 sca_wr_en,
  output cfeb_pkg::blk_t       sca_wr_blk,
  output cfeb_pkg::cell_t      sca_wr_cell,
  output cfeb_pkg::blk_t       sca_rd_blk,
  output cfeb_pkg::cell_t      sca_rd_cell,
  output logic [3:0]           sca_rd_strip,
  output logic                 adc_conv,
  input  cfeb_pkg::adc_t       adc_data [cfeb_pkg::NLAYER],
  output logic [15:0]          dmb_data,
  output logic                 dmb_valid,
  output logic                 dav,
  output logic                 movlp,
  output logic [3:0]           nf_sca,
  output logic                 sca_full
);
  import cfeb_pkg::*;
  localparam int LW = $clog2(L1A_DEPTH);

  logic [1:0]     push_n;
  rd_entry_t      push_data [3];
  rd_entry_t      head;
  logic           l1a_empty, l1a_full, ent_pop;
  logic [LW:0]    l1a_space;
  logic           take_valid, take_x, rel_valid;
  blk_t           take_blk, rel_blk;
  cell_t          take_cell;
  logic [7:0]     blk_tt [NBLK];
  logic [3:0]     lct_pipe_cnt, l1a_lock_cnt;
  logic           lct_pipe_empty, lct_pipe_full;
  logic           job_valid, job_ready;
  tx_job_t        job;
  logic [8:0]     l1a_pipe_cnt;

  sca_controller #(.LCT_LATENCY(LCT_LATENCY), .L1A_X(L1A_X)) u_ctrl (
    .clk, .rst_n, .sync_rst, .lct, .l1a, .ts16,
    .sca_wr_en, .sca_wr_blk, .sca_wr_cell, .bx(),
    .push_n, .push_data, .l1a_space(9'(l1a_space)),
    .take_valid, .take_blk, .take_cell, .take_x, .rel_valid, .rel_blk,
    .blk_tt, .nf_sca, .sca_full, .lct_pipe_cnt, .lct_pipe_empty,
    .lct_pipe_full, .l1a_lock_cnt, .dav, .movlp, .l1a_num()
  );

  l1a_pipe #(.DEPTH(L1A_DEPTH)) u_l1a_pipe (
    .clk, .rst_n, .flush(sync_rst), .push_n, .push_data, .pop(ent_pop),
    .head, .empty(l1a_empty), .full(l1a_full), .count(),
    .space(l1a_space)
  );

  sca_readout u_readout (
    .clk, .rst_n, .flush(sync_rst), .ent(head), .ent_empty(l1a_empty),
    .ent_pop, .take_valid, .take_blk, .take_cell, .take_x,
    .rel_valid, .rel_blk, .sca_rd_blk, .sca_rd_cell, .sca_rd_strip, .adc_conv,
    .adc_data, .job_valid, .job, .job_ready
  );

  // L1A_PIPE_CNT: blocks locked by L1A x LCT (lost periods lock nothing)
  assign l1a_pipe_cnt = 9'(l1a_lock_cnt);

  cfeb_formatter u_fmt (
    .clk, .rst_n, .flush(sync_rst), .job_valid, .job, .job_ready,
    .blk_tt, .sca_full, .nf_sca, .lct_pipe_cnt, .lct_pipe_empty,
    .lct_pipe_full, .l1a_pipe_cnt, .l1a_pipe_full(l1a_full), .ts16,
    .dout(dmb_data), .dout_valid(dmb_valid)
  );
endmodule
