// CRC-16 register for checking the integrity of a bus transfer. Each clock
// with `en` high it folds a DW-bit data word into the running CRC, most
// significant bit first, with the generator polynomial POLY (default
// x^16 + x^12 + x^5 + 1, the CCITT polynomial) and no reflection or final
// XOR. `clr` returns the register to INIT; when both are high `clr` wins.
// The whole word is folded in one clock (the bit-serial shift unrolled DW
// times), and `crc` shows the result from the clock after the update.
// CRC checking on critical buses follows the architecture; the polynomial,
// the word width and the framing are this design's choices.
module crc16 #(
  parameter int unsigned DW   = 32,
  parameter logic [15:0] POLY = 16'h1021,
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [DW-1:0] d,
  output logic [15:0]   crc
);
  function automatic logic [15:0] fold(logic [15:0] c, logic [DW-1:0] w);
    logic [15:0] r;
    r = c;
    for (int k = DW - 1; k >= 0; k--)
      r = (r[15] ^ w[k]) ? ((r << 1) ^ POLY) : (r << 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   crc <= INIT;
    else if (clr) crc <= INIT;
    else if (en)  crc <= fold(crc, d);
endmodule
