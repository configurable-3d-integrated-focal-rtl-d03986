// Data memory of one processor: DEPTH bytes, true dual port with two clocks.
// Port A (core clock) is byte wide and serves the processor and the
// neighbourhood arbiter; port B (data transfer clock) is 32 bits wide with
// byte enables and serves the external image transfer bridge, so image I/O
// runs in parallel with processing. Both ports read synchronously (data one
// cycle after the address). The dual-port organisation and 512 bytes follow
// the architecture; the 32-bit port B width is this design's choice.
// The array is written from two clock domains on purpose (dual-port RAM);
// writes to the same byte from both ports in the same moment are not
// arbitrated and must be avoided by the program.
module data_mem #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                         clka,
  input  logic                         wea,
  input  logic [$clog2(DEPTH)-1:0]     addra,
  input  logic [7:0]                   dina,
  output logic [7:0]                   douta,
  input  logic                         clkb,
  input  logic                         enb,
  input  logic [3:0]                   web,
  input  logic [$clog2(DEPTH)-3:0]     addrb,
  input  logic [31:0]                  dinb,
  output logic [31:0]                  doutb
);
  logic [3:0][7:0] mem [DEPTH/4];

  always_ff @(posedge clka) begin
    if (wea) mem[addra[$clog2(DEPTH)-1:2]][addra[1:0]] <= dina;
    douta <= mem[addra[$clog2(DEPTH)-1:2]][addra[1:0]];
  end

  always_ff @(posedge clkb) begin
    if (enb) begin
      for (int k = 0; k < 4; k++)
        if (web[k]) mem[addrb][k] <= dinb[8*k +: 8];
      doutb <= mem[addrb];
    end
  end
endmodule
