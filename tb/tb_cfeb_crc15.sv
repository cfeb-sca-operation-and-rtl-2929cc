// tb_cfeb_crc15: checks the 15-bit sample CRC against an integer reference
// over many random 96-word samples, including that bits above 12 of a word
// do not enter it and that 'clear' restarts it.
// Drives one word per 10-unit clock; the registered CRC is compared one
// cycle after the last word. The 96-word sample and the 13 checked bits
// follow the data format; the reference recurrence is the same reading of
// the CRC as the RTL (the polynomial is not fixed by the format).
module tb_cfeb_crc15;
  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [12:0] din = '0;
  logic [14:0] crc, crc_next;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cfeb_crc15 dut (.clk, .rst_n, .clear, .en, .din, .crc, .crc_next);

  function automatic int ref_step(int c, int w);
    int d;
    d = w & 'h1fff;
    return (d ^ (d << 1) ^ (((c & 'h7ffc) >> 2) | ((c & 3) << 13)) ^
            ((c & 'h7ffc) >> 1)) & 'h7fff;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 12; s++) begin
      r = 0;
      for (int i = 0; i < 96; i++) begin
        w = $urandom;
        @(negedge clk);
        clear = (i == 0);
        en    = 1'b1;
        din   = 13'(w);
        r     = ref_step(r, w);
      end
      @(negedge clk);
      en = 1'b0; clear = 1'b0;
      checks++;
      if (crc != 15'(r)) begin
        failures++;
        $display("FAIL sample %0d: crc %h expected %h", s, crc, r);
      end
    end
    // a known value: one word 1 gives 3, then 0 gives ((3&3)<<13) = 0x6000
    @(negedge clk); clear = 1'b1; en = 1'b1; din = 13'd1;
    @(negedge clk); clear = 1'b0; din = 13'd0;
    @(negedge clk); en = 1'b0;
    checks++;
    if (crc != 15'h6000) begin failures++; $display("FAIL known value %h", crc); end
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    checks++;
    if (crc != 15'h0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
