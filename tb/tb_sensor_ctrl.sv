// Self-checking test of sensor_ctrl with an ideal analog model: pixel p of
// the tile presents the code (37*p + 11 + 50*frame) mod 256 and the
// comparator reports code >= DAC. Two frames are requested by toggles; every
// pixel must be written once, in order, with its code; the reset phase must
// last RST_CYC clocks and the scan must take TILE*TILE*9 clocks (8-bit SAR,
// back-to-back conversions). Three frames set up the integration length
// differently (0 = default INT_CYC, then 40, then 3 clocks); the time from
// the end of reset to the first sample must follow it.
module tb_sensor_ctrl;
  localparam int TILE = 8, RST = 4, INT = 16;
  logic clk = 0, rst_n = 0, start_tgl = 0; logic [8:0] int_len = 0;
  logic pix_rst, adc_sample, adc_cmp, bw_en, frame_done, busy;
  logic [5:0] pix_sel, bw_addr; logic [7:0] adc_dac, bw_data;
  int checks = 0, failures = 0, frame = 0, nwr = 0, nrst = 0, t_first, t_done, cyc = 0, t_rst_end, t_samp;
  int ilen_tab[3] = '{0, 40, 3};
  sensor_ctrl #(.TILE(TILE), .RST_CYC(RST), .INT_CYC(INT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  function automatic int code(int p, int f); return (37 * p + 11 + 50 * f) % 256; endfunction
  assign adc_cmp = code(int'(pix_sel), frame) >= int'(adc_dac);
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (pix_rst) begin nrst++; t_rst_end = cyc; t_samp = -1; end
    if (adc_sample && t_samp < 0) t_samp = cyc;
    if (bw_en) begin
      checks += 2;
      if (nwr == 0) t_first = cyc;
      if (int'(bw_addr) != nwr) begin failures++; $display("FAIL order %0d", bw_addr); end
      if (int'(bw_data) != code(nwr, frame)) begin failures++; $display("FAIL data p%0d", nwr); end
      nwr++;
    end
    if (frame_done) t_done = cyc;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      frame = f; nwr = 0; nrst = 0;
      @(negedge clk); start_tgl = ~start_tgl; int_len = 9'(ilen_tab[f]);
      @(posedge frame_done); @(posedge clk); #1;
      checks += 4;
      if (t_samp - t_rst_end != (ilen_tab[f] == 0 ? INT : ilen_tab[f]) + 1) begin
        failures++; $display("FAIL integration %0d clocks, f%0d", t_samp - t_rst_end, f);
      end
      if (nwr != TILE * TILE) begin failures++; $display("FAIL %0d writes", nwr); end
      if (nrst != RST) begin failures++; $display("FAIL reset %0d clocks", nrst); end
      if (t_done - t_first != (TILE * TILE - 1) * 9 + 1) begin
        failures++; $display("FAIL scan time %0d", t_done - t_first);
      end
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
