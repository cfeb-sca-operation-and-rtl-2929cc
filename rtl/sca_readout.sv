// sca_readout: digitization sequencer of the CFEB.
//
// Takes L1A pipeline entries in order. For an entry of a real block it reads
// the marked cells of that block one after the other; for each cell it
// selects the 16 strips in Gray-code order (0,1,3,2,6,7,5,4,12,...,9,8) and
// starts one conversion per strip on all six flash ADCs (one ADC per layer)
// at once. A conversion takes CONV_BX (6 BX = 150 ns); at its end the six
// results go to the formatter as one job, the last strip of a cell marked so
// that the formatter appends the sample trailer. After the 16th strip the
// sequencer waits GAP_BX (4 BX) so that the 4 trailer words fit before the
// next cell's data: one time sample takes 100 BX, the length of its frame.
// When the last marked cell of a block has been converted the block is
// released back to the controller. For an entry of a never-sampled period it
// emits one B-word job per marked cell, one every BWORD_BX (4 BX).
//
// Overhead: the first conversion of an entry taken while idle starts
// T0_BASE_BX + SKIP_BX*(n-1) BX after the L1A, n being its first cell
// (400 ns + 150 ns*(TRIG_TIME-1)); an entry taken while busy waits only
// SKIP_BX*(n-1). The entry is visible one BX after the L1A and is taken in
// that cycle, which the first wait accounts for.
//
// At the first conversion of each cell the sequencer tells the controller
// ('take') that the cell is being read; the answer 'take_x' (0 when a later
// event shares the sample) is sent with every word of that sample.
//
// The split of the 100 BX into 96 BX of conversions and 4 BX for the trailer,
// and the B-word pacing, are this design's choices.
module sca_readout #(
  parameter int CONV_BX    = 6,   // 150 ns per conversion
  parameter int T0_BASE_BX = 16,  // 400 ns fixed overhead
  parameter int SKIP_BX    = 6,   // 150 ns per cur_cell before the first one
  parameter int GAP_BX     = 4,   // trailer words after each sample
  parameter int BWORD_BX   = 4    // B-words per missing sample
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   flush,          // Sync Reset
  // L1A pipeline
  input  cfeb_pkg::rd_entry_t    ent,
  input  logic                   ent_empty,
  output logic                   ent_pop,
  // controller
  output logic                   take_valid,
  output cfeb_pkg::blk_t         take_blk,
  output cfeb_pkg::cell_t        take_cell,
  input  logic                   take_x,
  output logic                   rel_valid,
  output cfeb_pkg::blk_t         rel_blk,
  // SCA read side and flash ADCs
  output cfeb_pkg::blk_t         sca_rd_blk,
  output cfeb_pkg::cell_t        sca_rd_cell,
  output logic [3:0]             sca_rd_strip,
  output logic                   adc_conv,
  input  cfeb_pkg::adc_t         adc_data [cfeb_pkg::NLAYER],
  // formatter
  output logic                   job_valid,
  output cfeb_pkg::tx_job_t      job,
  input  logic                   job_ready
);
  import cfeb_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_CONV, S_GAP, S_BW} state_t;

  state_t     state;
  rd_entry_t  cur;
  logic [7:0] left;        // cells still to do
  cell_t      cur_cell;    // cell in work (0-based)
  logic [3:0] pos;         // strip position
  logic [7:0] cnt;         // BX counter inside a state
  logic       x_q;
  logic       started;     // 'take' done for the current cell

  function automatic cell_t first_cell(input logic [7:0] m);
    first_cell = '0;
    for (int c = NCELL - 1; c >= 0; c--) if (m[c]) first_cell = cell_t'(c);
  endfunction

  logic  fetch;        // take the head entry this cycle
  logic  last_gap;
  logic  conv_end;
  cell_t nfirst;

  assign nfirst     = first_cell(ent.cells);
  assign conv_end   = (state == S_CONV) && (cnt == 8'(CONV_BX - 1));
  assign last_gap   = (state == S_GAP) && (cnt == 8'(GAP_BX - 1)) && (left == 8'h00);
  assign fetch      = !ent_empty && ((state == S_IDLE) || last_gap ||
                      ((state == S_BW) && cnt == 8'(BWORD_BX - 1) &&
                       (left & ~(8'h01 << cur_cell)) == 8'h00));
  assign ent_pop    = fetch;

  assign take_valid = (state == S_CONV) && !started;
  assign take_blk   = cur.blk;
  assign take_cell  = cur_cell;

  assign sca_rd_blk   = cur.blk;
  assign sca_rd_cell  = cur_cell;
  assign sca_rd_strip = strip_at(pos);
  assign adc_conv     = (state == S_CONV) && (cnt == 8'd0);

  // jobs
  always_comb begin
    job           = '0;
    job.pos       = pos;
    job.last      = (pos == 4'd15);
    job.x         = started ? x_q : take_x;
    job.blk       = cur.blk;
    job.tt        = cur.tt;
    job.l1a_phase = cur.l1a_phase;
    job.lct_phase = cur.lct_phase;
    job.l1a_num   = cur.l1a_num;
    job.bword     = (state == S_BW);
    for (int l = 0; l < NLAYER; l++) job.adc[l] = adc_data[l];
    job_valid = (conv_end || ((state == S_BW) && cnt == 8'd0)) && job_ready;
  end

  assign rel_valid = conv_end && job_ready && (pos == 4'd15) &&
                     ((left & ~(8'h01 << cur_cell)) == 8'h00);
  assign rel_blk   = cur.blk;

  // first state and counter after taking entry 'ent'; the T0 base overhead
  // applies when the sequencer was idle
  state_t     st_state;
  logic [7:0] st_cnt;
  always_comb begin
    int w;
    w = SKIP_BX * int'(nfirst) + ((state == S_IDLE) ? T0_BASE_BX - 2 : 0);
    if (ent.bword) begin
      st_state = S_BW;
      st_cnt   = '0;
    end else if (w == 0) begin
      st_state = S_CONV;
      st_cnt   = '0;
    end else begin
      st_state = S_WAIT;
      st_cnt   = 8'(w - 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur     <= '0;
      left    <= '0;
      cur_cell <= '0;
      pos     <= '0;
      cnt     <= '0;
      x_q     <= 1'b1;
      started <= 1'b0;
    end else if (flush) begin
      state   <= S_IDLE;
      left    <= '0;
      started <= 1'b0;
    end else begin
      if (take_valid) begin
        started <= 1'b1;
        x_q     <= take_x;
      end
      if (fetch) begin
        cur      <= ent;
        left     <= ent.cells;
        cur_cell <= nfirst;
        pos      <= '0;
        started  <= 1'b0;
        state    <= st_state;
        cnt      <= st_cnt;
      end else case (state)
        S_IDLE: ;
        S_WAIT: begin
          if (cnt == 8'd0) state <= S_CONV;
          else cnt <= cnt - 1'b1;
        end
        S_CONV: begin
          if (cnt != 8'(CONV_BX - 1)) cnt <= cnt + 1'b1;
          else if (job_ready) begin
            cnt <= '0;
            pos <= pos + 1'b1;
            if (pos == 4'd15) begin
              left  <= left & ~(8'h01 << cur_cell);
              state <= S_GAP;
            end
          end
        end
        S_GAP: begin
          if (cnt != 8'(GAP_BX - 1)) cnt <= cnt + 1'b1;
          else if (left != 8'h00) begin
            state   <= S_CONV;
            cnt     <= '0;
            cur_cell <= first_cell(left);
            started <= 1'b0;
          end else state <= S_IDLE;
        end
        S_BW: begin
          if (cnt == 8'd0 && !job_ready) cnt <= '0;
          else if (cnt != 8'(BWORD_BX - 1)) cnt <= cnt + 1'b1;
          else begin
            cnt  <= '0;
            left <= left & ~(8'h01 << cur_cell);
            if ((left & ~(8'h01 << cur_cell)) != 8'h00)
              cur_cell <= first_cell(left & ~(8'h01 << cur_cell));
            else state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
