// Self-checking test of sar_adc_ctrl with an ideal comparator model
// (cmp = input code >= DAC code): every input code 0..255 must convert to
// itself, with `done` high BITS+1 clocks after the start clock.
module tb_sar_adc_ctrl;
  logic clk = 0, rst_n = 0, start = 0, cmp;
  logic sample, done, busy; logic [7:0] dac, result;
  int vin;
  int checks = 0, failures = 0;
  sar_adc_ctrl dut (.*);
  assign cmp = (vin >= int'(dac));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int cyc;
    vin = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk); vin = v; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (result != 8'(v)) begin failures++; $display("FAIL code %0d -> %0d", v, result); end
      if (cyc != 9) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
