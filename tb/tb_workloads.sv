// Image-operator workloads on the full-size array (defaults: 8x8 processors,
// 8x8-pixel tiles, 64x64 image): 3x3 smoothing convolution, 9x9 convolution
// with signed weights, 3x3 local minimum (compare + masked move), 3x3 binary
// dilation in bit mode, and one thinning step built from a hit-and-miss
// transform, and a full skeletonization: thinning with the eight rotations
// of the two L-shaped hit-and-miss elements, repeated until a pass changes
// nothing, which the host learns from the array-wide OR. Images are loaded over the data bus, programs streamed over the
// program bus, results read back and compared with references computed here
// in global image coordinates (zero grey boundary, configurable binary
// boundary). The core clocks each operator takes (instructions taken from
// the program buffer plus stall clocks) are counted and printed per pixel;
// each operator is bounded by its instruction count plus the stalls the
// decoder's write/read rule allows.
module tb_workloads;
  import xenon_pkg::*;
  localparam int NX = 8, NY = 8, NPE = 64, T = 8, W = 64;
  logic clk_core = 0, clk_prog = 0, clk_data = 0, clk_adc = 0, rst_n = 0;
  logic pwb_cyc = 0, pwb_stb = 0, pwb_we = 0; logic [1:0] pwb_adr = 0;
  logic [31:0] pwb_dat_i = 0, pwb_dat_o; logic pwb_ack;
  logic dwb_cyc = 0, dwb_stb = 0, dwb_we = 0; logic [13:0] dwb_adr = 0;
  logic [3:0] dwb_sel = 0; logic [31:0] dwb_dat_i = 0, dwb_dat_o; logic dwb_ack;
  logic [NPE-1:0] pix_rst, adc_sample, adc_cmp; logic [NPE-1:0][5:0] pix_sel;
  logic [NPE-1:0][7:0] adc_dac;
  logic gor, gor_valid, busy, stall; logic [NPE-1:0] pe_standby;

  int checks = 0, failures = 0;
  int n_stall = 0;

  xenon_top dut (.*);

  always #10 clk_core = ~clk_core;
  always #2 clk_prog = ~clk_prog;
  always #4 clk_data = ~clk_data;
  always #7 clk_adc  = ~clk_adc;

  initial begin : watchdog
    repeat (2000000) @(posedge clk_core);
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
  function automatic int bimg0(int x, int y);   // binary image, boundary 0
    if (x < 0 || y < 0 || x >= W || y >= W) return 0;
    return bimg(x, y);
  endfunction
  function automatic int gimg(int x, int y);   // zero boundary
    if (x < 0 || y < 0 || x >= W || y >= W) return 0;
    return img(x, y);
  endfunction

  // analog front end: each tile's comparator
  always_comb
    for (int k = 0; k < NPE; k++) adc_cmp[k] = scode(k, int'(pix_sel[k])) >= int'(adc_dac[k]);

  always @(posedge clk_core) if (rst_n && stall) n_stall++;

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
    dwb_adr = {1'b0, 6'(k), 7'(word)}; dwb_dat_i = d;
    do @(posedge clk_data); while (!dwb_ack);
    #1; dwb_cyc = 0; dwb_stb = 0;
  endtask
  task automatic drd(input int k, input int word, output logic [31:0] d);
    @(negedge clk_data); dwb_cyc = 1; dwb_stb = 1; dwb_we = 0; dwb_adr = {1'b0, 6'(k), 7'(word)};
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
  task automatic issue(input instr_t i);
    logic [63:0] w;
    w = 64'(i);
    pwr(0, w[31:0]);
    pwr(1, w[63:32]);
  endtask
  // core clocks spent on instructions: one per instruction taken, one per stall
  int n_cyc = 0;
  always @(posedge clk_core) if (rst_n && (dut.f_pop || dut.stall)) n_cyc++;
  task automatic report(input string name, input int c0, input int ninstr);
    int c;
    c = n_cyc - c0;
    $display("%s: %0d core clocks for %0d pixels, %0d.%03d clocks per pixel", name, c,
             NPE * T * T, c / (NPE * T * T), (c % (NPE * T * T)) * 1000 / (NPE * T * T));
    checks++;
    if (c < ninstr || c > 2 * ninstr) begin failures++; $display("FAIL %s clock count", name); end
  endtask
  // global OR seen since the host last cleared it
  logic gor_any = 0;
  always @(posedge clk_core) if (gor_valid && gor) gor_any <= 1'b1;
  // L-shaped thinning elements: entry t of base element e is (dx, dy, value)
  int el_n[2] = '{7, 6};
  int el_dx[2][7] = '{'{0, -1, 0, 1, -1, 0, 1}, '{0, -1, 0, 0, 1, 1, 0}};
  int el_dy[2][7] = '{'{0, 1, 1, 1, -1, -1, -1}, '{0, 0, 1, -1, -1, 0, 0}};
  int el_v[2][7]  = '{'{1, 1, 1, 1, 0, 0, 0}, '{1, 1, 1, 0, 0, 0, 0}};
  // element k (0..7): base k%2 rotated k/2 times by 90 degrees
  task automatic elem(input int k, input int t, output int dx, output int dy, output int v);
    int x, y, tmp;
    x = el_dx[k % 2][t]; y = el_dy[k % 2][t];
    for (int r = 0; r < k / 2; r++) begin tmp = x; x = -y; y = tmp; end
    dx = x; dy = y; v = el_v[k % 2][t];
  endtask
  task automatic wait_idle();
    logic [31:0] st;
    do prd(2, st); while (st[1] || !dut.f_empty);
    repeat (4) @(posedge clk_core);
  endtask

  // ---------------- test ----------------
  function automatic int w9(int i, int j); return ((i * 3 + j * 5) % 7) - 3; endfunction
  function automatic int g3(int i, int j); return (i == 0 ? 2 : 1) * (j == 0 ? 2 : 1); endfunction

  initial begin
    int v, e, s, m, n, c0;
    repeat (3) @(posedge clk_core); rst_n = 1;
    repeat (3) @(posedge clk_core);
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
      end
      for (int wd = 0; wd < 2; wd++) begin
        logic [31:0] d;
        for (int b = 0; b < 4; b++)
          for (int j = 0; j < 8; j++)
            d[8*b + j] = 1'(bimg(px * T + j, py * T + wd * 4 + b) == 1);
        dwr(k, 80 + wd, d);
      end
    end
    issue(mk(OP_SETB, SA_IMM, 0, 0));              // grey boundary 0, binary boundary 0
    wait_idle(); c0 = n_cyc;
    // 3x3 smoothing (1 2 1 / 2 4 2 / 1 2 1) / 16 -> bytes 64..127
    issue(mk(OP_SETIDX, SA_IMM, 0, 0));
    for (int p = 0; p < T * T; p++) begin
      for (int t = 0; t < 9; t++)
        issue(mk(t == 0 ? OP_MUL : OP_MACC, SA_MEM, 0, g3(t % 3 - 1, t / 3 - 1), t % 3 - 1, t / 3 - 1));
      issue(mk(OP_SHR, SA_MEM, 0, 4));
      issue(mk(OP_SAT8, SA_MEM, 64, 0, 0, 0, C_AL, D_MEM, 0));
      issue(mk(OP_INCIDX));
    end
    wait_idle(); report("conv 3x3", c0, 1 + T * T * 12); c0 = n_cyc;
    // 9x9 convolution, signed weights, /64, signed saturation -> bytes 128..191
    issue(mk(OP_SETIDX, SA_IMM, 0, 0));
    for (int p = 0; p < T * T; p++) begin
      issue(mk(OP_CLRACC));
      for (int t = 0; t < 81; t++)
        issue(mk(OP_MACC, SA_MEM, 0, w9(t % 9 - 4, t / 9 - 4), t % 9 - 4, t / 9 - 4));
      issue(mk(OP_SHR, SA_MEM, 0, 6));
      issue(mk(OP_SAT8, SA_MEM, 128, 0, 0, 0, C_AL, D_MEM, 1));
      issue(mk(OP_INCIDX));
    end
    wait_idle(); report("conv 9x9", c0, 1 + T * T * 85); c0 = n_cyc;
    // 3x3 local minimum -> bytes 192..255
    issue(mk(OP_SETB, SA_IMM, 0, 255));             // grey boundary 255 for the minimum
    issue(mk(OP_SETIDX, SA_IMM, 0, 0));
    for (int p = 0; p < T * T; p++) begin
      issue(mk(OP_MOV, SA_MEM, 0, 0, 0, 0, C_AL, D_REG, 0, 0, 1, 0));
      for (int t = 0; t < 9; t++) begin
        instr_t c;
        if (t == 4) continue;
        c = mk(OP_CMP, SA_MEM, 0, 0, t % 3 - 1, t / 3 - 1);
        c.srcb = SB_REG0;
        issue(c);
        issue(mk(OP_MOV, SA_MEM, 0, 0, t % 3 - 1, t / 3 - 1, C_LT, D_REG, 0, 0, 1, 0));
      end
      issue(mk(OP_MOV, SA_REG, 192, 0, 0, 0, C_AL, D_MEM, 0, 0, 1, 0));
      issue(mk(OP_INCIDX));
    end
    wait_idle(); report("local minimum 3x3", c0, 2 + T * T * 19); c0 = n_cyc;
    // binary dilation 3x3, boundary 0 -> bytes 336..343
    issue(mk(OP_SETB, SA_IMM, 0, 0));
    for (int r = 0; r < T; r++) begin
      issue(mk(OP_SETIDX, SA_IMM, 0, r * T));
      for (int t = 0; t < 9; t++)
        issue(mk(t == 0 ? OP_MLD : OP_MOR, SA_MEM, 320, 0, t % 3 - 1, t / 3 - 1, C_AL, D_REG, 0, 1));
      issue(mk(OP_MOV, SA_MORPH, 336, 0, 0, 0, C_AL, D_MEM, 0, 1));
    end
    wait_idle(); report("binary dilation 3x3", c0, 1 + T * 11); c0 = n_cyc;
    // thinning step: hit-and-miss H = c & s & ~n (-> 344..351), out = c & ~H (-> 352..359)
    for (int r = 0; r < T; r++) begin
      issue(mk(OP_SETIDX, SA_IMM, 0, r * T));
      issue(mk(OP_MLD,   SA_MEM, 320, 0, 0,  0, C_AL, D_REG, 0, 1));
      issue(mk(OP_MAND,  SA_MEM, 320, 0, 0,  1, C_AL, D_REG, 0, 1));
      issue(mk(OP_MANDN, SA_MEM, 320, 0, 0, -1, C_AL, D_REG, 0, 1));
      issue(mk(OP_MOV,   SA_MORPH, 344, 0, 0, 0, C_AL, D_MEM, 0, 1));
      issue(mk(OP_MLD,   SA_MEM, 320, 0, 0,  0, C_AL, D_REG, 0, 1));
      issue(mk(OP_MANDN, SA_MEM, 344, 0, 0,  0, C_AL, D_REG, 0, 1));
      issue(mk(OP_MOV,   SA_MORPH, 352, 0, 0, 0, C_AL, D_MEM, 0, 1));
    end
    wait_idle(); report("thinning step", c0, T * 8);
    for (int k = 0; k < NPE; k++) begin
      int px, py;
      px = k % NX; py = k / NX;
      for (int p = 0; p < T * T; p++) begin
        int gx, gy;
        gx = px * T + p % T; gy = py * T + p / T;
        s = 0;
        for (int t = 0; t < 9; t++) s += g3(t % 3 - 1, t / 3 - 1) * gimg(gx + t % 3 - 1, gy + t / 3 - 1);
        e = s / 16; if (e > 255) e = 255;
        rbyte(k, 64 + p, v); checks++;
        if (v != e) begin failures++; $display("FAIL conv3 (%0d,%0d) %0d exp %0d", gx, gy, v, e); end
        s = 0;
        for (int t = 0; t < 81; t++) s += w9(t % 9 - 4, t / 9 - 4) * gimg(gx + t % 9 - 4, gy + t / 9 - 4);
        s = (s >= 0) ? s / 64 : -((-s + 63) / 64);
        e = (s > 127) ? 127 : (s < -128) ? -128 : s;
        rbyte(k, 128 + p, v); checks++;
        if (v != (e & 255)) begin failures++; $display("FAIL conv9 (%0d,%0d) %0d exp %0d", gx, gy, v, e & 255); end
        m = 255;
        for (int t = 0; t < 9; t++) begin
          n = (gx + t % 3 - 1 < 0 || gy + t / 3 - 1 < 0 || gx + t % 3 - 1 >= W || gy + t / 3 - 1 >= W)
              ? 255 : img(gx + t % 3 - 1, gy + t / 3 - 1);
          if (n < m) m = n;
        end
        rbyte(k, 192 + p, v); checks++;
        if (v != m) begin failures++; $display("FAIL min (%0d,%0d) %0d exp %0d", gx, gy, v, m); end
      end
      for (int r = 0; r < T; r++) begin
        int ed, et;
        ed = 0; et = 0;
        for (int j = 0; j < 8; j++) begin
          int b, c, hm;
          int x0, y0;
          x0 = px * T + j; y0 = py * T + r;
          b = 0;
          for (int t = 0; t < 9; t++) b |= bimg0(x0 + t % 3 - 1, y0 + t / 3 - 1);
          ed |= b << j;
          c = bimg0(x0, y0);
          hm = c & bimg0(x0, y0 + 1) & (1 - bimg0(x0, y0 - 1));
          et |= (c & (1 - hm)) << j;
        end
        rbyte(k, 336 + r, v); checks++;
        if (v != ed) begin failures++; $display("FAIL dilation k%0d r%0d %h exp %h", k, r, v, ed); end
        rbyte(k, 352 + r, v); checks++;
        if (v != et) begin failures++; $display("FAIL thinning k%0d r%0d %h exp %h", k, r, v, et); end
      end
    end
    // ---- skeletonization: A = 400.., B = 408.., H = 416.., pass start C = 424.. ----
    begin
      int cur[W][W], nxt[W][W];
      int ref_passes, hw_passes, dx, dy, ev;
      bit ch;
      for (int k = 0; k < NPE; k++)
        for (int wd = 0; wd < 2; wd++) begin
          logic [31:0] d;
          int px, py;
          px = k % NX; py = k / NX;
          for (int b = 0; b < 4; b++)
            for (int j = 0; j < 8; j++)
              d[8*b + j] = 1'(bimg(px * T + j, py * T + wd * 4 + b) == 1);
          dwr(k, 100 + wd, d);
        end
      // reference
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) cur[y][x] = bimg0(x, y);
      ref_passes = 0;
      do begin
        ch = 0; ref_passes++;
        for (int k = 0; k < 8; k++) begin
          for (int y = 0; y < W; y++)
            for (int x = 0; x < W; x++) begin
              int h;
              h = 1;
              for (int t = 0; t < el_n[k % 2]; t++) begin
                int px, py, pv;
                elem(k, t, dx, dy, ev);
                px = x + dx; py = y + dy;
                pv = (px < 0 || py < 0 || px >= W || py >= W) ? 0 : cur[py][px];
                if (pv != ev) h = 0;
              end
              nxt[y][x] = cur[y][x] & (1 - h);
              if (nxt[y][x] != cur[y][x]) ch = 1;
            end
          cur = nxt;
        end
      end while (ch && ref_passes < 40);
      // array: one program per pass, until the global OR reports no change
      c0 = n_cyc;
      hw_passes = 0;
      do begin
        hw_passes++;
        for (int r = 0; r < T; r++) begin
          issue(mk(OP_SETIDX, SA_IMM, 0, r * T));
          issue(mk(OP_MLD, SA_MEM, 400, 0, 0, 0, C_AL, D_REG, 0, 1));
          issue(mk(OP_MOV, SA_MORPH, 424, 0, 0, 0, C_AL, D_MEM, 0, 1));
        end
        for (int k = 0; k < 8; k++) begin
          int src, dst;
          src = (k % 2 == 0) ? 400 : 408; dst = (k % 2 == 0) ? 408 : 400;
          for (int r = 0; r < T; r++) begin
            issue(mk(OP_SETIDX, SA_IMM, 0, r * T));
            for (int t = 0; t < el_n[k % 2]; t++) begin
              elem(k, t, dx, dy, ev);
              issue(mk(t == 0 ? OP_MLD : (ev == 1 ? OP_MAND : OP_MANDN), SA_MEM, src, 0, dx, dy,
                       C_AL, D_REG, 0, 1));
            end
            issue(mk(OP_MOV,   SA_MORPH, 416, 0, 0, 0, C_AL, D_MEM, 0, 1));
            issue(mk(OP_MLD,   SA_MEM, src, 0, 0, 0, C_AL, D_REG, 0, 1));
            issue(mk(OP_MANDN, SA_MEM, 416, 0, 0, 0, C_AL, D_REG, 0, 1));
            issue(mk(OP_MOV,   SA_MORPH, dst, 0, 0, 0, C_AL, D_MEM, 0, 1));
          end
        end
        wait_idle();
        gor_any = 0;
        for (int r = 0; r < T; r++) begin
          issue(mk(OP_SETIDX, SA_IMM, 0, r * T));
          issue(mk(OP_MLD,  SA_MEM, 400, 0, 0, 0, C_AL, D_REG, 0, 1));
          issue(mk(OP_MXOR, SA_MEM, 424, 0, 0, 0, C_AL, D_REG, 0, 1));
          issue(mk(OP_GOR,  SA_MEM, 0, 0, 0, 0, C_NZ));
        end
        wait_idle();
      end while (gor_any && hw_passes < 40);
      $display("skeletonization: %0d passes (reference %0d), %0d core clocks", hw_passes, ref_passes,
               n_cyc - c0);
      checks++;
      if (hw_passes != ref_passes) begin failures++; $display("FAIL skeleton pass count"); end
      for (int k = 0; k < NPE; k++) begin
        int px, py;
        px = k % NX; py = k / NX;
        for (int r = 0; r < T; r++) begin
          int e8;
          e8 = 0;
          for (int j = 0; j < 8; j++) e8 |= cur[py * T + r][px * T + j] << j;
          rbyte(k, 400 + r, v); checks++;
          if (v != e8) begin failures++; $display("FAIL skeleton k%0d r%0d %h exp %h", k, r, v, e8); end
        end
      end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("stalls %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
