// Sensor data buffer of one tile: two banks of TILE*TILE bytes between the
// ADC clock domain (write) and the processor core clock domain (read). The
// ADC writes one bank while the processor reads the last completed one, so the
// converter runs at full speed without waiting for the processor. At
// `frame_done` the banks swap; the swap is carried to the core domain by a
// two-flop synchroniser, and `frame_rdy` goes high there until the processor
// requests the next conversion (`clr_rdy`). Reads are synchronous: `rdata`
// holds the byte at `raddr` of the completed bank one core clock later.
// A third, 32-bit read port in the data transfer clock domain (`tclk`,
// `taddr`, `tdata`, one clock latency) gives test access to the converted
// frames from the external bus, which turns the chip into a plain camera.
// Buffering with a ready feedback and external test access follow the
// architecture; two banks and the word-wide test port are this design's
// choices.
module sensor_buffer #(
  parameter int unsigned TILE = 8
) (
  input  logic                         wclk,
  input  logic                         wrst_n,
  input  logic                         we,
  input  logic [$clog2(TILE*TILE)-1:0] waddr,
  input  logic [7:0]                   wdata,
  input  logic                         frame_done,
  input  logic                         rclk,
  input  logic                         rrst_n,
  input  logic [$clog2(TILE*TILE)-1:0] raddr,
  output logic [7:0]                   rdata,
  input  logic                         clr_rdy,
  output logic                         frame_rdy,
  input  logic                         tclk,
  input  logic                         trst_n,
  input  logic [$clog2(TILE*TILE)-3:0] taddr,
  output logic [31:0]                  tdata
);
  localparam int unsigned N = TILE * TILE;
  localparam int unsigned PW = $clog2(N);
  logic [3:0][7:0] mem [2*N/4];
  logic            wbank;
  logic [2:0]      bsync;
  logic [1:0]      tsync;

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n)         wbank <= 1'b0;
    else if (frame_done) wbank <= ~wbank;

  always_ff @(posedge wclk) if (we) mem[{wbank, waddr[PW-1:2]}][waddr[1:0]] <= wdata;

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      bsync <= '0; frame_rdy <= 1'b0;
    end else begin
      bsync <= {bsync[1:0], wbank};
      if (bsync[2] != bsync[1]) frame_rdy <= 1'b1;
      else if (clr_rdy)         frame_rdy <= 1'b0;
    end

  always_ff @(posedge rclk) rdata <= mem[{~bsync[2], raddr[PW-1:2]}][raddr[1:0]];

  always_ff @(posedge tclk or negedge trst_n)
    if (!trst_n) tsync <= '0;
    else         tsync <= {tsync[0], wbank};

  always_ff @(posedge tclk) tdata <= mem[{~tsync[1], taddr}];
endmodule
