// Focal-plane sensor-processor array: an NX x NY array of SIMD processors,
// each serving a TILE x TILE pixel sensor tile, inside a shell of program and
// data bridges. With the defaults (8x8 processors, 8x8 pixels each) it senses
// and processes 64x64-pixel images.
//
// Four clock domains run concurrently:
//   clk_prog - program transfer: Wishbone program bridge -> program buffer;
//   clk_core - processors: instruction decoder, neighbourhood arbiter,
//              processors, port A of the memories, sensor buffer read side;
//   clk_data - image transfer: Wishbone data bridge -> port B of memories;
//   clk_adc  - sensor interface: tile controllers, SAR logic, buffer write.
// Domain crossings use the dual-clock program FIFO, the dual-port memories,
// the double-buffered sensor buffers and two-flop synchronisers.
//
// Each processor has a 512-byte memory; the decoder reads all memories at the
// same address and the arbiter hands each processor its own or a neighbour's
// byte (or a 1-bit aligned binary row). SSTART makes a processor start a
// conversion of its own tile; operand source SA_SENS reads the tile's
// completed frame at the current pixel index, and SRDY reads its frame-ready
// feedback. The data bus can also read every tile's completed frame directly.
// The program bridge checks the instruction stream with a CRC-16 that the
// host compares through its word 3.
// HAS_ARITH, HAS_MORPH and HAS_MEM configure the processors' optional units
// and memories for a smaller array; all are included by default, the
// full-featured array. Without memories the processors work on sensor data
// and registers, memory operands read as zero and memory writes are lost.
// The analog front end of each tile (pixel readout, multiplexer, DAC,
// comparator) is outside: its controls are outputs, the comparator an input.
// `gor`/`gor_valid` give the array-wide OR; `busy` is high while instructions
// are pending. A single asynchronous reset, released synchronously to each
// clock by the system, is assumed.
// The array/shell organisation and clock domains follow the architecture;
// the bridge address maps and the reset scheme are this design's choices.
module xenon_top
  import xenon_pkg::*;
#(
  parameter int unsigned NX         = 8,
  parameter int unsigned NY         = 8,
  parameter int unsigned TILE       = 8,
  parameter int unsigned MEM_DEPTH  = 512,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned INT_CYC    = 16,
  parameter bit          HAS_ARITH  = 1'b1,  // include the arithmetic unit in every processor
  parameter bit          HAS_MORPH  = 1'b1,  // include the morphology unit in every processor
  parameter bit          HAS_MEM    = 1'b1,  // include the data memory of every processor
  localparam int unsigned NPE       = NX * NY,
  localparam int unsigned PW        = $clog2(TILE * TILE),
  localparam int unsigned DAW       = $clog2(NPE) + $clog2(MEM_DEPTH) - 1
) (
  input  logic                 clk_core,
  input  logic                 clk_prog,
  input  logic                 clk_data,
  input  logic                 clk_adc,
  input  logic                 rst_n,
  // program bus (Wishbone slave)
  input  logic                 pwb_cyc,
  input  logic                 pwb_stb,
  input  logic                 pwb_we,
  input  logic [1:0]           pwb_adr,
  input  logic [31:0]          pwb_dat_i,
  output logic [31:0]          pwb_dat_o,
  output logic                 pwb_ack,
  // data bus (Wishbone slave)
  input  logic                 dwb_cyc,
  input  logic                 dwb_stb,
  input  logic                 dwb_we,
  input  logic [DAW-1:0]       dwb_adr,
  input  logic [3:0]           dwb_sel,
  input  logic [31:0]          dwb_dat_i,
  output logic [31:0]          dwb_dat_o,
  output logic                 dwb_ack,
  // analog sensor front end, one set per tile
  output logic [NPE-1:0]       pix_rst,
  output logic [NPE-1:0][PW-1:0] pix_sel,
  output logic [NPE-1:0]       adc_sample,
  output logic [NPE-1:0][7:0]  adc_dac,
  input  logic [NPE-1:0]       adc_cmp,
  // handshake / status
  output logic                 gor,
  output logic                 gor_valid,
  output logic                 busy,
  output logic                 stall,
  output logic [NPE-1:0]       pe_standby
);
  // ---------------- program path ----------------
  logic   f_push, f_full, f_pop, f_empty;
  instr_t f_wdata, f_rdata;
  logic   gor_tgl;
  logic [NPE-1:0] frame_rdy;

  wb_prog_bridge u_pbridge (
    .clk(clk_prog), .rst_n, .wb_cyc(pwb_cyc), .wb_stb(pwb_stb), .wb_we(pwb_we),
    .wb_adr(pwb_adr), .wb_dat_i(pwb_dat_i), .wb_dat_o(pwb_dat_o), .wb_ack(pwb_ack),
    .push(f_push), .pdata(f_wdata), .full(f_full), .gor_a(gor), .gor_tgl_a(gor_tgl),
    .busy_a(busy), .sens_rdy_a(&frame_rdy));

  async_fifo #(.W(INSTR_W), .DEPTH(FIFO_DEPTH)) u_pfifo (
    .wclk(clk_prog), .wrst_n(rst_n), .push(f_push), .wdata(f_wdata), .full(f_full),
    .rclk(clk_core), .rrst_n(rst_n), .pop(f_pop), .rdata(f_rdata), .empty(f_empty));

  // ---------------- decoder ----------------
  logic [MEM_AW-1:0] mem_addr;
  logic [PW-1:0]     idx;
  uop_t              uop;
  logic [NPE-1:0]    gor_bits;

  instr_decoder #(.TILE(TILE), .NPE(NPE)) u_dec (
    .clk(clk_core), .rst_n, .ins(f_rdata), .empty(f_empty), .pop(f_pop),
    .mem_addr, .idx, .uop, .stall, .busy, .gor_bits, .gor, .gor_valid);

  always_ff @(posedge clk_core or negedge rst_n)
    if (!rst_n)         gor_tgl <= 1'b0;
    else if (gor_valid) gor_tgl <= ~gor_tgl;

  // ---------------- arbiter ----------------
  logic [NY-1:0][NX-1:0][7:0] rdata_a, opnd;

  nbr_arbiter #(.NX(NX), .NY(NY)) u_arb (
    .clk(clk_core), .rst_n,
    .setb(uop.valid && uop.ins.op == OP_SETB), .setb_val(uop.ins.imm),
    .rdata(rdata_a), .sx(uop.sx), .sy(uop.sy), .dx(uop.ins.dx),
    .bmode(uop.ins.bmode), .opnd);

  // ---------------- data path ----------------
  logic [NPE-1:0]        m_en;
  logic [3:0]            m_we;
  logic [$clog2(MEM_DEPTH)-3:0] m_addr;
  logic [31:0]           m_wdata;
  logic [NPE-1:0][31:0]  m_rdata, s_rdata;

  wb_data_bridge #(.NPE(NPE), .DEPTH(MEM_DEPTH)) u_dbridge (
    .clk(clk_data), .rst_n, .wb_cyc(dwb_cyc), .wb_stb(dwb_stb), .wb_we(dwb_we),
    .wb_adr(dwb_adr), .wb_sel(dwb_sel), .wb_dat_i(dwb_dat_i), .wb_dat_o(dwb_dat_o),
    .wb_ack(dwb_ack), .m_en, .m_we, .m_addr, .m_wdata, .m_rdata, .s_rdata);

  // ---------------- processors, memories, sensor tiles ----------------
  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int unsigned K = y * NX + x;
      logic       we, sstart, stgl, bw_en, fdone;
      logic [7:0] wd, sens, bw_data;
      logic [PW-1:0] bw_addr;
      logic [8:0]    ilen;

      proc_core #(.HAS_ARITH(HAS_ARITH), .HAS_MORPH(HAS_MORPH)) u_pe (
        .clk(clk_core), .rst_n, .uop, .opnd(opnd[y][x]), .sens, .srdy(frame_rdy[K]),
        .mem_we(we), .mem_wd(wd), .sstart, .gor_bit(gor_bits[K]),
        .standby(pe_standby[K]), .flags(), .morph_q(), .acc());

      if (HAS_MEM) begin : g_mem
        data_mem #(.DEPTH(MEM_DEPTH)) u_mem (
          .clka(clk_core), .wea(we), .addra(mem_addr), .dina(wd), .douta(rdata_a[y][x]),
          .clkb(clk_data), .enb(m_en[K]), .web(m_we), .addrb(m_addr), .dinb(m_wdata),
          .doutb(m_rdata[K]));
      end else begin : g_no_mem
        assign rdata_a[y][x] = '0;
        assign m_rdata[K]    = '0;
      end

      // start request toggle and its integration set-up (SSTART immediate)
      always_ff @(posedge clk_core or negedge rst_n)
        if (!rst_n) begin
          stgl <= 1'b0;
          ilen <= '0;
        end else if (sstart) begin
          stgl <= ~stgl;
          ilen <= uop.ins.imm;
        end

      sensor_ctrl #(.TILE(TILE), .INT_CYC(INT_CYC)) u_sctl (
        .clk(clk_adc), .rst_n, .start_tgl(stgl), .int_len(ilen), .pix_rst(pix_rst[K]),
        .pix_sel(pix_sel[K]), .adc_sample(adc_sample[K]), .adc_dac(adc_dac[K]),
        .adc_cmp(adc_cmp[K]), .bw_en, .bw_addr, .bw_data, .frame_done(fdone), .busy());

      sensor_buffer #(.TILE(TILE)) u_sbuf (
        .wclk(clk_adc), .wrst_n(rst_n), .we(bw_en), .waddr(bw_addr), .wdata(bw_data),
        .frame_done(fdone), .rclk(clk_core), .rrst_n(rst_n), .raddr(idx), .rdata(sens),
        .clr_rdy(sstart), .frame_rdy(frame_rdy[K]),
        .tclk(clk_data), .trst_n(rst_n), .taddr(m_addr[PW-3:0]), .tdata(s_rdata[K]));
    end
  end
endmodule
