// End-to-end test of the full-size array (8x8 processors, 8x8-pixel tiles,
// 64x64 image) with all parameters at their defaults, four unrelated clocks
// and an ideal analog front end model per tile (pixel code compared with the
// DAC code). The host side:
//   1. loads a 64x64 grey image, a binary image and a fill pattern into all
//      processor memories through the data bus;
//   2. streams programs through the program bus:
//      a. vertical Sobel with neighbour access and zero boundary, /8 by
//         arithmetic shift, signed 8-bit saturated store, read back;
//      b. threshold by compare + standby: processors whose pixel is below 128
//         sleep, the others write 0xFF, then all wake; the array-wide OR of
//         "pixel < 128" is evaluated for every pixel position;
//      c. 3x3 binary erosion in bit mode with boundary 1;
//      d. sensor conversion of all tiles, with the integration length set up by
//         the SSTART immediate; each processor checks its tile's
//         frame-ready feedback and copies the frame to memory;
//      e. the same frames are read directly through the data bus sensor
//         window (camera mode), and a write to that window must be ignored;
//      f. the CRC of every program word sent is checked by the bridge;
//   3. reads all results back through the data bus and compares them with a
//      reference computed here over the global image.
// It counts the mechanisms: pipeline stalls, neighbour accesses crossing to
// another processor, boundary substitution, bit-mode accesses, masked writes,
// standby entries and wake-ups, global-OR results, program buffer full, sensor
// frames; each must occur.
module tb_xenon_top;
  import xenon_pkg::*;
  localparam int NX = 8, NY = 8, NPE = 64, T = 8, W = 64;
  logic clk_core = 0, clk_prog = 0, clk_data = 0, clk_adc = 0, rst_n = 0;
  logic pwb_cyc = 0, pwb_stb = 0, pwb_we = 0; logic [1:0] pwb_adr = 0;
  logic [31:0] pwb_dat_i = 0, pwb_dat_o; logic pwb_ack;
  logic dwb_cyc = 0, dwb_stb = 0, dwb_we = 0; logic [13:0] dwb_adr = 0; logic dwb_region = 0;
  logic [3:0] dwb_sel = 0; logic [31:0] dwb_dat_i = 0, dwb_dat_o; logic dwb_ack;
  logic [NPE-1:0] pix_rst, adc_sample, adc_cmp; logic [NPE-1:0][5:0] pix_sel;
  logic [NPE-1:0][7:0] adc_dac;
  logic gor, gor_valid, busy, stall; logic [NPE-1:0] pe_standby;

  int checks = 0, failures = 0;
  int n_stall = 0, n_cross = 0, n_bit = 0, n_full = 0, n_stby = 0, n_wake = 0, n_gor = 0, n_frames = 0;
  int n_masked = 0, n_bnd = 0;
  logic gq[$];

  xenon_top dut (.*);

  always #10 clk_core = ~clk_core;
  always #2 clk_prog = ~clk_prog;
  always #4 clk_data = ~clk_data;
  always #7 clk_adc  = ~clk_adc;
  // integration length of tile 0, in ADC clocks from end of reset to first sample
  localparam int ILEN = 24;
  int t_adc = 0, t_rst_end = 0, t_int = -1;
  always @(posedge clk_adc) begin
    t_adc++;
    if (pix_rst[0]) begin t_rst_end = t_adc; t_int = -1; end
    else if (adc_sample[0] && t_int < 0) t_int = t_adc - t_rst_end;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk_core);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference images ----------------
  function automatic int img(int x, int y); return (x * 13 + y * 7 + (x * y) % 17) & 255; endfunction
  function automatic int bimg(int x, int y);
    if (x < 0 || y < 0 || x >= W || y >= W) return 1;
    return int'(((x * 5 + y * 3) % 7) != 0 && ((x + 2 * y) % 11) != 0);
  endfunction
  function automatic int scode(int k, int p); return (k * 29 + p * 7 + 3) & 255; endfunction
  function automatic int gimg(int x, int y);   // zero boundary
    if (x < 0 || y < 0 || x >= W || y >= W) return 0;
    return img(x, y);
  endfunction

  // analog front end: each tile's comparator
  always_comb
    for (int k = 0; k < NPE; k++) adc_cmp[k] = scode(k, int'(pix_sel[k])) >= int'(adc_dac[k]);

  // ---------------- mechanism counters ----------------
  logic [NPE-1:0] stby_q = '0;
  logic fr_q = 0;
  always @(posedge clk_core) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.uop.valid && !dut.uop.ins.bmode && (dut.uop.sx != 0 || dut.uop.sy != 0)) n_cross++;
    if (dut.uop.valid && dut.uop.ins.bmode) n_bit++;
    if (dut.uop.valid && !dut.uop.ins.bmode && dut.uop.sy == -2'sd1 && dut.uop.ins.op == OP_MUL) n_bnd++;
    if (dut.uop.valid && dut.uop.ins.op == OP_MOV && dut.uop.ins.cond == C_AL
        && dut.uop.ins.srca == SA_IMM)
      for (int k = 0; k < NPE; k++) if (pe_standby[k]) n_masked++;
    for (int k = 0; k < NPE; k++) begin
      if (pe_standby[k] && !stby_q[k]) n_stby++;
      if (!pe_standby[k] && stby_q[k]) n_wake++;
    end
    stby_q <= pe_standby;
    if (gor_valid) begin
      n_gor++; checks++;
      if (gq.size() == 0 || gor != gq[0]) begin failures++; $display("FAIL global OR"); end
      if (gq.size() != 0) void'(gq.pop_front());
    end
    if (dut.u_pfifo.full) n_full++;
    fr_q <= &dut.frame_rdy;
    if (&dut.frame_rdy && !fr_q) n_frames++;
  end

  // ---------------- bus tasks ----------------
  task automatic pwr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk_prog); pwb_cyc = 1; pwb_stb = 1; pwb_we = 1; pwb_adr = a; pwb_dat_i = d;
    do @(posedge clk_prog); while (!pwb_ack);
    #1; pwb_cyc = 0; pwb_stb = 0;
  endtask
  task automatic prd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk_prog); pwb_cyc = 1; pwb_stb = 1; pwb_we = 0; pwb_adr = a;
    do @(posedge clk_prog); while (!pwb_ack);
    #1; d = pwb_dat_o; pwb_cyc = 0; pwb_stb = 0;
  endtask
  task automatic dwr(input int k, input int word, input logic [31:0] d);
    @(negedge clk_data); dwb_cyc = 1; dwb_stb = 1; dwb_we = 1; dwb_sel = 4'hF;
    dwb_adr = {dwb_region, 6'(k), 7'(word)}; dwb_dat_i = d;
    do @(posedge clk_data); while (!dwb_ack);
    #1; dwb_cyc = 0; dwb_stb = 0;
  endtask
  task automatic drd(input int k, input int word, output logic [31:0] d);
    @(negedge clk_data); dwb_cyc = 1; dwb_stb = 1; dwb_we = 0; dwb_adr = {dwb_region, 6'(k), 7'(word)};
    do @(posedge clk_data); while (!dwb_ack);
    #1; d = dwb_dat_o; dwb_cyc = 0; dwb_stb = 0;
  endtask
  // read one byte of processor k's memory
  task automatic rbyte(input int k, input int a, output int v);
    logic [31:0] d;
    drd(k, a / 4, d);
    v = int'(d[8 * (a % 4) +: 8]);
  endtask

  function automatic instr_t mk(opcode_e op, srca_e sa = SA_MEM, int addr = 0, int imm = 0,
                                int dx = 0, int dy = 0, cond_e c = C_AL, dst_e dst = D_REG,
                                logic sga = 0, logic bm = 0, logic ui = 1, int r = 0);
    instr_t i;
    i = '0; i.op = op; i.srca = sa; i.addr = 9'(addr); i.imm = 9'(imm); i.dx = 4'(dx);
    i.dy = 4'(dy); i.cond = c; i.dst = dst; i.sga = sga; i.bmode = bm; i.use_idx = ui;
    i.rsel = 2'(r); i.srcb = SB_IMM;
    return i;
  endfunction
  // host-side CRC-16 (CCITT, MSB first) of every program word sent
  logic [15:0] h_crc = 16'hFFFF;
  function automatic logic [15:0] fold(logic [15:0] c, logic [31:0] w);
    for (int k = 31; k >= 0; k--) begin
      logic fb;
      fb = c[15] ^ w[k];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction
  task automatic issue(input instr_t i);
    logic [63:0] w;
    w = 64'(i);
    pwr(0, w[31:0]);
    pwr(1, w[63:32]);
    h_crc = fold(fold(h_crc, w[31:0]), w[63:32]);
  endtask
  task automatic wait_idle();
    logic [31:0] st;
    do prd(2, st); while (st[1] || !dut.f_empty);
    repeat (4) @(posedge clk_core);
  endtask

  // ---------------- test ----------------
  initial begin
    int kw[6], kdx[6], kdy[6], v, e, s;
    logic [31:0] st;
    kw = '{1, 2, 1, -1, -2, -1}; kdx = '{-1, 0, 1, -1, 0, 1}; kdy = '{-1, -1, -1, 1, 1, 1};
    repeat (3) @(posedge clk_core); rst_n = 1;
    repeat (3) @(posedge clk_core);
    // 1. load memories
    for (int k = 0; k < NPE; k++) begin
      int px, py;
      px = k % NX; py = k / NX;
      for (int wd = 0; wd < 16; wd++) begin
        logic [31:0] d;
        for (int b = 0; b < 4; b++) begin
          int p;
          p = wd * 4 + b;
          d[8*b +: 8] = 8'(img(px * T + p % T, py * T + p / T));
        end
        dwr(k, wd, d);
        dwr(k, 48 + wd, 32'h11111111);     // bytes 192..255
      end
      for (int wd = 0; wd < 2; wd++) begin
        logic [31:0] d;
        for (int b = 0; b < 4; b++)
          for (int j = 0; j < 8; j++)
            d[8*b + j] = 1'(bimg(px * T + j, py * T + wd * 4 + b));
        dwr(k, 80 + wd, d);                 // bytes 320..327
      end
    end
    // 2a. Sobel
    issue(mk(OP_SETB, SA_IMM, 0, 9'h100));
    issue(mk(OP_SETIDX, SA_IMM, 0, 0));
    for (int p = 0; p < T * T; p++) begin
      for (int t = 0; t < 6; t++)
        issue(mk(t == 0 ? OP_MUL : OP_MACC, SA_MEM, 0, kw[t], kdx[t], kdy[t]));
      issue(mk(OP_SHR, SA_MEM, 0, 3));
      issue(mk(OP_SAT8, SA_MEM, 64, 0, 0, 0, C_AL, D_MEM, 1));
      issue(mk(OP_MOV, SA_MEM, 64, 0, 0, 0, C_AL, D_REG));   // read back: stalls
      issue(mk(OP_INCIDX));
    end
    // 2b. threshold with standby, global OR
    issue(mk(OP_SETIDX, SA_IMM, 0, 0));
    for (int p = 0; p < T * T; p++) begin
      logic any;
      issue(mk(OP_CMP, SA_MEM, 0, 128));
      issue(mk(OP_GOR, SA_MEM, 0, 0, 0, 0, C_LT));
      any = 0;
      for (int k = 0; k < NPE; k++) if (img((k % NX) * T + p % T, (k / NX) * T + p / T) < 128) any = 1;
      gq.push_back(any);
      issue(mk(OP_STBY, SA_MEM, 0, 0, 0, 0, C_LT));
      issue(mk(OP_MOV, SA_IMM, 192, 8'hFF, 0, 0, C_AL, D_MEM));
      issue(mk(OP_WAKE, SA_IMM, 0, 1));
      issue(mk(OP_INCIDX));
    end
    // 2c. binary erosion, 3x3, boundary 1
    for (int r = 0; r < T; r++) begin
      issue(mk(OP_SETIDX, SA_IMM, 0, r * T));
      for (int t = 0; t < 9; t++)
        issue(mk(t == 0 ? OP_MLD : OP_MAND, SA_MEM, 320, 0, t % 3 - 1, t / 3 - 1, C_AL, D_REG, 0, 1));
      issue(mk(OP_MOV, SA_MORPH, 328, 0, 0, 0, C_AL, D_MEM, 0, 1));
    end
    // 2d. sensor frame
    issue(mk(OP_SSTART, SA_MEM, 0, ILEN));          // integration set up to ILEN clocks
    wait_idle();
    do prd(2, st); while (!st[3]);
    issue(mk(OP_SETIDX, SA_IMM, 0, 0));
    issue(mk(OP_SRDY));                             // F <= own tile's frame ready
    for (int p = 0; p < T * T; p++) begin
      issue(mk(OP_MOV, SA_SENS, 256, 0, 0, 0, C_F, D_MEM));
      issue(mk(OP_INCIDX));
    end
    wait_idle();
    // 2e. camera mode: sensor window of the data bus (region 1)
    for (int k = 0; k < NPE; k++)
      for (int w = 0; w < T * T / 4; w++) begin
        logic [31:0] d;
        dwb_region = 1'b1;
        drd(k, w, d);
        dwb_region = 1'b0;
        for (int b = 0; b < 4; b++) begin
          checks++;
          if (int'(d[8 * b +: 8]) != scode(k, 4 * w + b)) begin
            failures++; $display("FAIL camera k%0d p%0d %0d", k, 4 * w + b, d[8 * b +: 8]);
          end
        end
      end
    dwb_region = 1'b1;
    dwr(5, 64 / 4, 32'hDEADBEEF);                   // must not reach data memory
    dwb_region = 1'b0;
    // 2f. transfer check of the whole program by CRC
    begin
      logic [31:0] st;
      pwr(3, {16'd0, h_crc});
      prd(2, st);
      checks++;
      if (st[5:4] != 2'b01) begin failures++; $display("FAIL program CRC check %b", st[5:4]); end
    end
    // 3. read back and compare
    for (int k = 0; k < NPE; k++) begin
      int px, py;
      px = k % NX; py = k / NX;
      for (int p = 0; p < T * T; p++) begin
        int gx, gy;
        gx = px * T + p % T; gy = py * T + p / T;
        s = 0;
        for (int t = 0; t < 6; t++) s += kw[t] * gimg(gx + kdx[t], gy + kdy[t]);
        s = (s >= 0) ? s / 8 : -((-s + 7) / 8);
        e = (s > 127) ? 127 : (s < -128) ? -128 : s;
        rbyte(k, 64 + p, v); checks++;
        if (v != (e & 255)) begin failures++; $display("FAIL sobel (%0d,%0d) %0d exp %0d", gx, gy, v, e & 255); end
        rbyte(k, 192 + p, v); checks++;
        if (v != (img(gx, gy) < 128 ? 8'h11 : 8'hFF)) begin failures++; $display("FAIL thr (%0d,%0d)", gx, gy); end
        rbyte(k, 256 + p, v); checks++;
        if (v != scode(k, p)) begin failures++; $display("FAIL sensor k%0d p%0d %0d", k, p, v); end
      end
      for (int r = 0; r < T; r++) begin
        int ev;
        rbyte(k, 328 + r, v);
        ev = 0;
        for (int j = 0; j < 8; j++) begin
          int b;
          b = 1;
          for (int t = 0; t < 9; t++) b &= bimg(px * T + j + t % 3 - 1, py * T + r + t / 3 - 1);
          ev |= b << j;
        end
        checks++;
        if (v != ev) begin failures++; $display("FAIL erosion k%0d r%0d %h exp %h", k, r, v, ev); end
      end
    end
    checks++;
    if (gq.size() != 0) begin failures++; $display("FAIL %0d global OR results missing", gq.size()); end
    $display("stalls %0d, cross-processor reads %0d, boundary reads %0d, bit-mode %0d",
             n_stall, n_cross, n_bnd, n_bit);
    $display("masked %0d, standby %0d, wake %0d, global OR %0d, fifo full %0d, frames %0d",
             n_masked, n_stby, n_wake, n_gor, n_full, n_frames);
    if (n_stall == 0)  begin failures++; $display("FAIL no stall"); end
    if (n_cross == 0)  begin failures++; $display("FAIL no neighbour access"); end
    if (n_bnd == 0)    begin failures++; $display("FAIL no boundary access"); end
    if (n_bit == 0)    begin failures++; $display("FAIL no bit-mode access"); end
    if (n_masked == 0) begin failures++; $display("FAIL no masked write"); end
    if (n_stby == 0 || n_wake == 0) begin failures++; $display("FAIL no standby/wake"); end
    if (n_gor != T * T) begin failures++; $display("FAIL global OR count"); end
    if (n_full == 0)   begin failures++; $display("FAIL program buffer never full"); end
    if (n_frames == 0) begin failures++; $display("FAIL no sensor frame"); end
    if (t_int != ILEN + 1) begin failures++; $display("FAIL integration %0d clocks", t_int); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
