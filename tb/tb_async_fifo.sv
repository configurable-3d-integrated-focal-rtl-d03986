// Self-checking test of async_fifo with unrelated write and read clocks and
// random push/pop activity: every word must come out once, in order. The
// test requires the full and empty conditions to occur, and pushing stops
// when full (the full flag must never let the FIFO overflow).
module tb_async_fifo;
  localparam int W = 46, D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic push = 0, pop = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_out = 0;
  async_fifo #(.W(W), .DEPTH(D)) dut (.*);
  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;
  initial begin : watchdog
    repeat (200000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge wclk); wrst_n = 1; rrst_n = 1;
  end
  // writer: bursts fast enough to fill the FIFO
  initial begin
    @(posedge wrst_n);
    for (int n = 0; n < 3000; ) begin
      @(negedge wclk);
      if (full) n_full++;
      push = !full && ($urandom_range(0, 3) != 0 || n > 1500);
      if (push) begin wdata = {$urandom, 14'($urandom)}; q.push_back(wdata); n++; end
      @(posedge wclk); #1; push = 0;
    end
  end
  // reader: slow in the first half, fast in the second
  initial begin
    @(posedge rrst_n);
    while (n_out < 3000) begin
      @(negedge rclk);
      if (empty) n_empty++;
      pop = !empty && ($urandom_range(0, 3) == 0 || n_out > 1500);
      if (pop) begin
        checks++;
        if (q.size() == 0 || rdata != q[0]) begin failures++; $display("FAIL order"); end
        if (q.size() != 0) void'(q.pop_front());
        n_out++;
      end
      @(posedge rclk); #1; pop = 0;
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty not seen"); end
    $display("full seen %0d, empty seen %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
