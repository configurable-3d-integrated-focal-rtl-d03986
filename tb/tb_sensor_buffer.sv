// Self-checking test of sensor_buffer with unrelated write (ADC) and read
// (core) clocks: frames are written while the previous one is read; after
// each frame_done the reader waits for frame_rdy and must see the whole new
// frame, never a mix of two frames. A third clock reads the same completed
// frame through the 32-bit test port after each frame_rdy.
module tb_sensor_buffer;
  localparam int TILE = 8, N = 64;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic we = 0, frame_done = 0, clr_rdy = 0, frame_rdy;
  logic [5:0] waddr = 0, raddr = 0; logic [7:0] wdata = 0, rdata;
  logic tclk = 0, trst_n = 0; logic [3:0] taddr = 0; logic [31:0] tdata;
  int checks = 0, failures = 0;
  sensor_buffer #(.TILE(TILE)) dut (.*);
  always #6 wclk = ~wclk;
  always #5 rclk = ~rclk;
  always #7 tclk = ~tclk;
  initial begin : watchdog
    repeat (50000) @(posedge rclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge rclk); wrst_n = 1; rrst_n = 1; trst_n = 1;
    for (int f = 0; f < 6; f++) begin
      // write frame f
      for (int p = 0; p < N; p++) begin
        @(negedge wclk); we = 1; waddr = 6'(p); wdata = 8'(p * 3 + f * 41);
      end
      @(negedge wclk); we = 0; frame_done = 1;
      @(negedge wclk); frame_done = 0;
      // reader: wait for ready, clear it, read the frame while the next is written
      fork
        begin
          @(negedge rclk);
          while (!frame_rdy) @(negedge rclk);
          clr_rdy = 1; @(negedge rclk); clr_rdy = 0;
          checks++;
          if (frame_rdy) begin failures++; $display("FAIL rdy not cleared"); end
          for (int p = 0; p < N; p++) begin
            raddr = 6'(p); @(posedge rclk); #1;
            checks++;
            if (rdata != 8'(p * 3 + f * 41)) begin failures++; $display("FAIL f%0d p%0d", f, p); end
            @(negedge rclk);
          end
        end
        begin
          // test port: wait for the bank switch to reach the tclk domain
          @(negedge rclk);
          while (!frame_rdy) @(negedge rclk);
          repeat (3) @(negedge tclk);
          for (int w = 0; w < N / 4; w++) begin
            @(negedge tclk); taddr = 4'(w); @(posedge tclk); #1;
            for (int b = 0; b < 4; b++) begin
              checks++;
              if (tdata[8 * b +: 8] != 8'((4 * w + b) * 3 + f * 41)) begin
                failures++; $display("FAIL test port f%0d p%0d", f, 4 * w + b);
              end
            end
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
