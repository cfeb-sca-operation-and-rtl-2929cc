// cfeb_crc15: running 15-bit CRC of one CFEB time sample.
//
// The CRC word (word 97 of a sample) protects the 96 data words before it;
// only the low 13 bits of each word (12 ADC bits and the under/overflow bit)
// enter it. The format fixes the width and the covered bits but not the
// recurrence; this design uses, per word d (13 bits),
//   crc <= d ^ (d << 1) ^ rotr2(crc) ^ ((crc & 0x7ffc) >> 1)
// which is the recurrence commonly used when unpacking CFEB data.
//
// Interface: 'clear' restarts at 0 (it wins over 'en'); 'en' folds 'din' in.
// 'crc' is registered: it shows the words folded in up to the previous cycle.
// 'crc_next' is the value including the word presented this cycle.
module cfeb_crc15 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [12:0] din,
  output logic [14:0] crc,
  output logic [14:0] crc_next
);
  import cfeb_pkg::*;

  always_comb begin
    crc_next = crc;
    if (en) crc_next = crc15_step(clear ? 15'd0 : crc, din);
    else if (clear) crc_next = 15'd0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) crc <= '0;
    else        crc <= crc_next;
endmodule
