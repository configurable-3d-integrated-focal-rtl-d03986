// Wishbone (classic, 32-bit) slave bus bridge of the image data path, in the
// data transfer clock domain. It reaches port B of every processor memory:
// the address is {region, processor (row-major, y*NX+x), word}. Region 0 is
// the processor's data memory (32-bit words, WB_SEL gives byte enables);
// region 1 is a read-only window on the processor's sensor buffer (the last
// completed frame), the external test access to the converters. Writes to
// region 1 are acknowledged and ignored.
// A request drives the addressed memory in the first clock; ACK and read data
// follow one clock later. This runs concurrently with processing.
// The bus and the bridge follow the architecture; the address map is this
// design's choice.
module wb_data_bridge #(
  parameter int unsigned NPE   = 64,
  parameter int unsigned DEPTH = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wb_cyc,
  input  logic                         wb_stb,
  input  logic                         wb_we,
  input  logic [$clog2(NPE)+$clog2(DEPTH)-2:0] wb_adr,
  input  logic [3:0]                   wb_sel,
  input  logic [31:0]                  wb_dat_i,
  output logic [31:0]                  wb_dat_o,
  output logic                         wb_ack,
  output logic [NPE-1:0]               m_en,
  output logic [3:0]                   m_we,
  output logic [$clog2(DEPTH)-3:0]     m_addr,
  output logic [31:0]                  m_wdata,
  input  logic [NPE-1:0][31:0]         m_rdata,
  input  logic [NPE-1:0][31:0]         s_rdata
);
  localparam int unsigned WA = $clog2(DEPTH) - 2;
  logic                  req;
  logic [$clog2(NPE)-1:0] pe, pe_q;
  logic                  region, region_q;

  assign req     = wb_cyc & wb_stb & ~wb_ack;
  assign pe      = wb_adr[WA +: $clog2(NPE)];
  assign region  = wb_adr[WA + $clog2(NPE)];
  assign m_addr  = wb_adr[WA-1:0];
  assign m_we    = (req & wb_we & ~region) ? wb_sel : 4'b0;
  assign m_wdata = wb_dat_i;
  always_comb begin
    m_en = '0;
    m_en[pe] = req & ~region;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb_ack   <= 1'b0;
      pe_q     <= '0;
      region_q <= 1'b0;
    end else begin
      wb_ack <= req;
      if (req) begin
        pe_q     <= pe;
        region_q <= region;
      end
    end

  assign wb_dat_o = region_q ? s_rdata[pe_q] : m_rdata[pe_q];
endmodule
