// sca_adc_model: behavioural model of the six SCA chips and six flash ADCs
// of a cathode front-end board, for testbenches only.
//
// Instead of analog voltages each SCA cell remembers the "cell time" it was
// written at: the index t/2 of the 50 ns interval, t counted in BX since
// Sync Reset. A conversion started with adc_conv reads the addressed cell
// and strip and, two BX later, presents on every layer's ADC output the code
//   adc_code(layer, strip, cell_time)
// so a checker can tell from the data which sample was read. The output is
// held until the next conversion. Unwritten cells read as cell time 0.
module sca_adc_model (
  input  logic             clk,
  input  int               t_bx,        // BX since Sync Reset
  input  logic             sca_wr_en,
  input  logic [3:0]       sca_wr_blk,
  input  logic [2:0]       sca_wr_cell,
  input  logic [3:0]       sca_rd_blk,
  input  logic [2:0]       sca_rd_cell,
  input  logic [3:0]       sca_rd_strip,
  input  logic             adc_conv,
  output logic [12:0]      adc_data [6]
);
  int   stamp [16][8];
  int   rd_ct;
  logic [3:0] rd_strip;
  logic [1:0] dly;

  function automatic logic [12:0] adc_code(int layer, int strip, int ct);
    int v;
    v = (ct * 97) ^ (strip << 7) ^ (layer << 10) ^ (ct >>> 5);
    return 13'(v);
  endfunction

  initial begin
    foreach (stamp[b, c]) stamp[b][c] = 0;
    rd_ct = 0; rd_strip = '0; dly = '0;
    foreach (adc_data[l]) adc_data[l] = '0;
  end

  always @(posedge clk) begin
    if (sca_wr_en) stamp[sca_wr_blk][sca_wr_cell] <= t_bx >>> 1;
    if (adc_conv) begin
      rd_ct    <= stamp[sca_rd_blk][sca_rd_cell];
      rd_strip <= sca_rd_strip;
      dly      <= 2'd2;
    end else if (dly != 0) begin
      dly <= dly - 1'b1;
      if (dly == 2'd1)
        for (int l = 0; l < 6; l++) adc_data[l] <= adc_code(l + 1, int'(rd_strip), rd_ct);
    end
  end
endmodule
