// Register bank of one processor: NREGS byte registers with one write port
// and two read ports (the selected register and register 0, which the crossbar
// can use as operand B). Writes at the clock edge; reads are combinational.
// The bank follows the architecture; its size (4) is this design's choice.
module reg_bank #(
  parameter int unsigned NREGS = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wsel,
  input  logic [7:0]               wd,
  input  logic [$clog2(NREGS)-1:0] rsel,
  output logic [7:0]               rd,
  output logic [7:0]               r0
);
  logic [7:0] r [NREGS];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  r <= '{default: '0};
    else if (we) r[wsel] <= wd;
  assign rd = r[rsel];
  assign r0 = r[0];
endmodule
