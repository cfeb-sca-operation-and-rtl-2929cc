// cfeb_pkg: constants, types and small pure functions shared by the CFEB
// SCA controller and readout.
//
// Timing unit is one bunch crossing (BX, 25 ns, one cycle of the 40 MHz
// clock). An SCA cell holds 50 ns (2 BX) of the amplifier output, a block is
// 8 cells (16 BX, 400 ns) and the SCA has 12 blocks. A flash-ADC conversion
// takes 150 ns (6 BX); one ADC per layer (6 layers) converts the 16 strips of
// a cell one after the other.
//
// Word formats (CFEB-2005 format):
//   data word   {0, x, y, adc[12:0]}   x=0 marks a sample reused by the next event
//   word 97     {0, crc[14:0]}
//   word 98     {0111, a, b, c, d, LCT_PIPE_CNT[3:0], NF_SCA[3:0]}
//   word 99     {0111, CFEB_L1A[5:0], L1A_PIPE_CNT code[4:0], e}
//   word 100    16'h7FFF
//   B-word      {1011, 001, SCA_FULL, TRIG_TIME[7:0]}
// The CRC recurrence and the L1A pipeline count code are this design's
// reading of fields whose exact formula is not fixed by the format.
package cfeb_pkg;

  localparam int NBLK         = 12;   // SCA blocks
  localparam int NCELL        = 8;    // cells per block
  localparam int NSTRIP       = 16;   // strips (SCA channels) per ADC
  localparam int NLAYER       = 6;    // layers = ADCs per CFEB
  localparam int ADCW         = 13;   // 12 ADC bits + under/overflow bit
  localparam int BXW          = 16;   // BX counter width (wraps)
  localparam int PERW         = BXW - 4; // block-period counter width
  localparam int WORDS_SAMPLE = 100;  // words per time sample

  typedef logic [3:0] blk_t;
  typedef logic [2:0] cell_t;
  typedef logic [ADCW-1:0] adc_t;

  // One entry of the L1A pipeline: a block (or a missing block) with the
  // cells of it still to be digitized for one event.
  typedef struct packed {
    logic       bword;     // block was never sampled: send B-words
    blk_t       blk;       // SCA block number
    logic [7:0] cells;     // bit k: cell k+1 of the block is to be digitized
    logic [7:0] tt;        // TRIG_TIME used for B-words
    logic       l1a_phase;
    logic       lct_phase;
    logic [5:0] l1a_num;   // CFEB_L1A of the event
  } rd_entry_t;

  // Work handed from the digitizer to the formatter.
  typedef struct packed {
    logic       bword;     // 1: four B-words, 0: six data words
    logic       last;      // data: last strip of the sample, trailer follows
    logic [3:0] pos;       // strip position 0..15 in transmission order
    logic       x;         // 0: sample reused by the next event
    blk_t       blk;
    logic [7:0] tt;        // TRIG_TIME for B-words
    logic       l1a_phase;
    logic       lct_phase;
    logic [5:0] l1a_num;
    adc_t [NLAYER-1:0] adc; // indexed by layer-1
  } tx_job_t;

  // Strips are transmitted in Gray-code order 0,1,3,2,6,7,5,4,12,...,9,8.
  function automatic logic [3:0] strip_at(input logic [3:0] pos);
    return pos ^ (pos >> 1);
  endfunction

  // Layers are transmitted in the order 3,1,5,6,4,2; returns layer-1.
  function automatic logic [2:0] layer_at(input logic [2:0] k);
    case (k)
      3'd0: return 3'd2;
      3'd1: return 3'd0;
      3'd2: return 3'd4;
      3'd3: return 3'd5;
      3'd4: return 3'd3;
      default: return 3'd1;
    endcase
  endfunction

  // Block allocation priority: 4-bit Gray sequence with codes >= 12 removed.
  function automatic blk_t blk_prio(input int i);
    logic [3:0] g;
    int n;
    n = 0;
    blk_prio = '0;
    for (int k = 0; k < 16; k++) begin
      g = 4'(k) ^ (4'(k) >> 1);
      if (g < 4'(NBLK)) begin
        if (n == i) blk_prio = g;
        n++;
      end
    end
  endfunction

  // One step of the 15-bit CRC over the low 13 bits of a data word.
  function automatic logic [14:0] crc15_step(input logic [14:0] crc,
                                             input logic [12:0] d);
    logic [14:0] dd, rot, sh;
    dd  = {2'b00, d} ^ {1'b0, d, 1'b0};
    rot = {crc[1:0], crc[14:2]};
    sh  = {1'b0, crc[14:2], 1'b0};
    return dd ^ rot ^ sh;
  endfunction

  // 5-bit L1A_PIPE_CNT field: value = bits(4:1) * 8^bit(5).
  function automatic logic [4:0] l1a_cnt_code(input logic [8:0] cnt);
    logic [8:0] q;
    if (cnt < 9'd16) return {1'b0, cnt[3:0]};
    q = cnt >> 3;
    if (q > 9'd15) return 5'h1F;
    return {1'b1, q[3:0]};
  endfunction

  function automatic logic [15:0] data_word(input logic x, input logic y,
                                            input adc_t adc);
    return {1'b0, x, y, adc};
  endfunction

  function automatic logic [15:0] b_word(input logic full,
                                         input logic [7:0] tt);
    return {4'b1011, 3'b001, full, tt};
  endfunction

endpackage
