// Dual-clock FIFO used as the program buffer between the program transfer
// clock domain and the processor core clock domain, so the instruction
// decoder runs independently of the fluctuating instruction transfer rate.
// Gray-coded read and write pointers cross the domains through two-flop
// synchronisers; `full` and `empty` are therefore conservative. The read side
// is show-ahead: `rdata` is the head entry while `empty` is low, and `pop`
// removes it at the next read-clock edge. DEPTH must be a power of two.
// The buffer follows the architecture; depth and structure are this
// design's choice.
module async_fifo #(
  parameter int unsigned W     = 46,
  parameter int unsigned DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_nx = wbin + {{AW{1'b0}}, push & ~full};
  assign rbin_nx = rbin + {{AW{1'b0}}, pop & ~empty};

  always_ff @(posedge wclk) if (push && !full) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_nx; wgray <= bin2gray(wbin_nx);
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_nx; rgray <= bin2gray(rbin_nx);
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end

  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
