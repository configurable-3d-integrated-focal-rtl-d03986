// Self-checking test of nbr_arbiter on an 8x8 array: random memory read data,
// neighbour offsets, pixel shifts and boundary values. The reference works in
// global image coordinates: in byte mode it fetches processor (x+sx, y+sy);
// in bit mode it finds, for each output bit, the global pixel column
// 8x+j+dx and takes that bit from the owning processor's row byte, using the
// boundary value outside the array.
module tb_nbr_arbiter;
  localparam int NX = 8, NY = 8;
  logic clk = 0, rst_n = 0, setb = 0, bmode = 0;
  logic [8:0] setb_val = 0;
  logic [NY-1:0][NX-1:0][7:0] rdata, opnd;
  logic signed [1:0] sx, sy; logic signed [3:0] dx;
  int checks = 0, failures = 0, n_bnd = 0;
  logic [7:0] bb; logic bt;

  nbr_arbiter #(.NX(NX), .NY(NY)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sx = 0; sy = 0; dx = 0; rdata = '0; bb = 0; bt = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      if (n % 50 == 0) begin
        @(negedge clk); setb = 1; setb_val = 9'($urandom);
        @(negedge clk); setb = 0; bb = setb_val[7:0]; bt = setb_val[8];
      end
      for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) rdata[y][x] = 8'($urandom);
      bmode = 1'($urandom);
      sx = 2'sd0; while (1) begin sx = 2'($urandom); if (sx != -2'sd2) break; end
      while (1) begin sy = 2'($urandom); if (sy != -2'sd2) break; end
      while (1) begin dx = 4'($urandom); if (dx != -4'sd8) break; end
      #1;
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          logic [7:0] e;
          int ty, tx, gx, px;
          ty = y + int'(sy);
          if (!bmode) begin
            tx = x + int'(sx);
            if (tx < 0 || tx >= NX || ty < 0 || ty >= NY) begin e = bb; n_bnd++; end
            else e = rdata[ty][tx];
          end else begin
            for (int j = 0; j < 8; j++) begin
              gx = 8 * x + j + int'(dx);
              px = (gx < 0) ? -1 : gx / 8;
              if (px < 0 || px >= NX || ty < 0 || ty >= NY) e[j] = bt;
              else e[j] = rdata[ty][px][gx % 8];
            end
          end
          checks++;
          if (opnd[y][x] != e) begin
            failures++;
            $display("FAIL (%0d,%0d) bmode=%0b sx=%0d sy=%0d dx=%0d got %h exp %h",
                     x, y, bmode, sx, sy, dx, opnd[y][x], e);
          end
        end
      @(posedge clk);
    end
    checks++;
    if (n_bnd == 0) begin failures++; $display("FAIL boundary never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
