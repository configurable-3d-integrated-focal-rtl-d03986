// Wishbone (classic, 32-bit) slave bus bridge of the program path. The
// program scheduler writes each instruction as two 32-bit words: word 0 holds
// instruction bits [31:0], a write to word 1 supplies the remaining bits and
// pushes the assembled instruction into the program buffer. While the buffer
// is full the word-1 write is not acknowledged, which stalls the bus. Word 2
// reads the array status (synchronised into this clock domain):
// bit 0 global OR result, bit 1 decoder busy, bit 2 buffer full,
// bit 3 all sensor tiles have a new frame, bits [15:8] count of completed
// global-OR evaluations, bit 4 last CRC check passed, bit 5 a CRC check has
// failed since reset (sticky). ACK comes one clock after STB.
// Transfer check: every word written to word 0 and every pushed word 1 is
// folded into a CRC-16 (crc16). Word 3 reads the running CRC; writing the
// expected CRC to word 3 compares it with the running value, records the
// outcome in status bits 4 and 5, and restarts the CRC for the next block of
// instructions.
// The bus protocol, the bridging role and CRC checking on this bus follow the
// architecture; the register map and the check framing are this design's
// choices.
module wb_prog_bridge
  import xenon_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wb_cyc,
  input  logic         wb_stb,
  input  logic         wb_we,
  input  logic [1:0]   wb_adr,
  input  logic [31:0]  wb_dat_i,
  output logic [31:0]  wb_dat_o,
  output logic         wb_ack,
  output logic         push,
  output instr_t       pdata,
  input  logic         full,
  input  logic         gor_a,        // core clock domain
  input  logic         gor_tgl_a,    // toggles at every global-OR evaluation
  input  logic         busy_a,
  input  logic         sens_rdy_a
);
  logic [31:0] lo;
  logic [2:0]  s1, s2;
  logic        t3;
  logic [7:0]  gcnt;
  logic        req;
  logic [1:0]  tsync;
  logic [15:0] crc;
  logic        crc_en, crc_chk, crc_ok, crc_err;

  assign req   = wb_cyc & wb_stb & ~wb_ack;
  assign push  = req & wb_we & (wb_adr == 2'd1) & ~full;
  assign pdata = instr_t'({wb_dat_i[INSTR_W-33:0], lo});
  assign crc_en  = push | (req & wb_we & (wb_adr == 2'd0));
  assign crc_chk = req & wb_we & (wb_adr == 2'd3);

  crc16 #(.DW(32)) u_crc (
    .clk, .rst_n, .clr(crc_chk), .en(crc_en), .d(wb_dat_i), .crc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo <= '0; wb_ack <= 1'b0; wb_dat_o <= '0;
      s1 <= '0; s2 <= '0; t3 <= 1'b0; gcnt <= '0;
      crc_ok <= 1'b0; crc_err <= 1'b0;
    end else begin
      s1 <= {sens_rdy_a, busy_a, gor_a}; s2 <= s1;
      t3 <= tsync[1];
      if (tsync[1] != t3) gcnt <= gcnt + 1'b1;
      wb_ack <= 1'b0;
      if (req) begin
        if (wb_we && wb_adr == 2'd0) lo <= wb_dat_i;
        if (crc_chk) begin
          crc_ok <= (wb_dat_i[15:0] == crc);
          if (wb_dat_i[15:0] != crc) crc_err <= 1'b1;
        end
        if (!(wb_we && wb_adr == 2'd1 && full)) wb_ack <= 1'b1;
        if (!wb_we)
          wb_dat_o <= (wb_adr == 2'd2) ? {16'd0, gcnt, 2'd0, crc_err, crc_ok, s2[2], full, s2[1], s2[0]}
                    : (wb_adr == 2'd3) ? {16'd0, crc}
                    : (wb_adr == 2'd0) ? lo : 32'd0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tsync <= '0;
    else        tsync <= {tsync[0], gor_tgl_a};
endmodule
