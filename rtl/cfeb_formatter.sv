// cfeb_formatter: builds the CFEB-2005 word stream pushed to the DMB.
//
// Jobs from the digitizer wait in a small queue (JOB_DEPTH). One word leaves
// per BX on 'dout' with 'dout_valid'.
//   Data job (one strip, six layers): six words {0, x, y, adc}, layers in
//   the order 3,1,5,6,4,2. The y bit carries one bit of a 16-bit status word
//   serialized over the 16 strips of the sample: the strip at position p
//   (0..15) carries y(p+1) with
//     y(1..8)  TRIG_TIME bits 0..7 of the block (read when the word leaves)
//     y(9..12) SCA block number bits 0..3
//     y(13)    L1A_PHASE, y(14) LCT_PHASE
//     y(15)    SCA_FULL, evaluated for every word as it leaves
//     y(16)    TS_FLAG (0: 8 samples, 1: 16 samples)
//   After the job of the 16th strip the trailer follows: word 97 the 15-bit
//   CRC of the 96 data words, word 98 {0111, L1A_PIPE_EMPTY, LCT_PIPE_EMPTY,
//   L1A_PIPE_FULL, LCT_PIPE_FULL, LCT_PIPE_CNT, NF_SCA}, word 99 {0111,
//   CFEB_L1A, L1A_PIPE_CNT code, L1A_PIPE_WARNING}, word 100 16'h7FFF.
//   The pipeline status is sampled when the word leaves.
//   B-word job (one lost sample): four words {1011, 001, SCA_FULL, TRIG_TIME}.
// Word layouts follow the CFEB-2005 format. The LSB-first order of the
// multi-bit y fields and the L1A_PIPE_CNT code (bits(4:1) * 8^bit(5)) are
// this design's reading of the format.
module cfeb_formatter #(
  parameter int JOB_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic                  job_valid,
  input  cfeb_pkg::tx_job_t     job,
  output logic                  job_ready,
  // live status
  input  logic [7:0]            blk_tt [cfeb_pkg::NBLK],
  input  logic                  sca_full,
  input  logic [3:0]            nf_sca,
  input  logic [3:0]            lct_pipe_cnt,
  input  logic                  lct_pipe_empty,
  input  logic                  lct_pipe_full,
  input  logic [8:0]            l1a_pipe_cnt,
  input  logic                  l1a_pipe_full,
  input  logic                  ts16,
  // to DMB
  output logic [15:0]           dout,
  output logic                  dout_valid
);
  import cfeb_pkg::*;
  localparam int AW = $clog2(JOB_DEPTH);

  typedef enum logic [1:0] {T_IDLE, T_DATA, T_TRAIL, T_BW} tstate_t;

  tx_job_t       q [JOB_DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   n;
  tstate_t       st;
  tx_job_t       cj;
  logic [2:0]    k;
  logic          take;

  assign job_ready = (n != (AW+1)'(JOB_DEPTH));

  // next word source
  logic last_word;
  always_comb begin
    case (st)
      T_DATA:  last_word = (k == 3'd5) && !cj.last;
      T_TRAIL: last_word = (k == 3'd3);
      T_BW:    last_word = (k == 3'd3);
      default: last_word = 1'b1;
    endcase
  end
  assign take = (n != '0) && last_word;

  // y bit of the current strip position
  logic ybit;
  always_comb begin
    logic [15:0] y;
    y[7:0]   = blk_tt[cj.blk];
    y[11:8]  = cj.blk;
    y[12]    = cj.l1a_phase;
    y[13]    = cj.lct_phase;
    y[14]    = sca_full;
    y[15]    = ts16;
    ybit     = y[cj.pos];
  end

  // CRC over the data words of one sample
  logic [14:0] crc, crc_next;
  logic        crc_en, crc_clr;
  assign crc_en  = (st == T_DATA);
  assign crc_clr = (st == T_DATA) && (cj.pos == 4'd0) && (k == 3'd0);
  cfeb_crc15 u_crc (.clk, .rst_n, .clear(crc_clr), .en(crc_en),
                    .din(cj.adc[layer_at(k)]), .crc, .crc_next);

  always_comb begin
    dout       = '0;
    dout_valid = (st != T_IDLE);
    case (st)
      T_DATA:  dout = data_word(cj.x, ybit, cj.adc[layer_at(k)]);
      T_TRAIL: case (k[1:0])
        2'd0: dout = {1'b0, crc};
        2'd1: dout = {4'b0111, (l1a_pipe_cnt == '0), lct_pipe_empty,
                      l1a_pipe_full, lct_pipe_full, lct_pipe_cnt, nf_sca};
        2'd2: dout = {4'b0111, cj.l1a_num, l1a_cnt_code(l1a_pipe_cnt),
                      (l1a_pipe_cnt > 9'd32)};
        default: dout = 16'h7FFF;
      endcase
      T_BW:    dout = b_word(sca_full, cj.tt);
      default: dout = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; n <= '0;
      st <= T_IDLE; cj <= '0; k <= '0;
    end else if (flush) begin
      rd <= '0; wr <= '0; n <= '0;
      st <= T_IDLE; k <= '0;
    end else begin
      if (job_valid && job_ready) begin
        q[wr] <= job;
        wr    <= wr + 1'b1;
      end
      n <= n + (AW+1)'(job_valid && job_ready) - (AW+1)'(take);
      if (take) begin
        cj <= q[rd];
        rd <= rd + 1'b1;
        k  <= '0;
        st <= q[rd].bword ? T_BW : T_DATA;
      end else begin
        case (st)
          T_DATA:  if (k == 3'd5) begin k <= '0; st <= cj.last ? T_TRAIL : T_IDLE; end
                   else k <= k + 1'b1;
          T_TRAIL: if (k == 3'd3) st <= T_IDLE; else k <= k + 1'b1;
          T_BW:    if (k == 3'd3) st <= T_IDLE; else k <= k + 1'b1;
          default: st <= T_IDLE;
        endcase
      end
    end
  end
endmodule
