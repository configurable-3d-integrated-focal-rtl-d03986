// Self-checking test of proc_core with directed instruction sequences:
// a 3x3 weighted sum with signed constants (multiply, multiply-add, shift,
// 8- and 16-bit saturated stores) over random neighbourhoods, register moves
// and register-register products, compare with conditional (masked) moves,
// binary erosion with the morphology unit, bit-field extraction, sensor
// operand, standby entry and wake-up, and the sensor start pulse. Expected
// values are computed with plain integer arithmetic in the testbench.
// A second instance without the optional arithmetic and morphology units
// runs the same stream; its moves and compares must still work while the
// left-out units read as zero.
module tb_proc_core;
  import xenon_pkg::*;
  logic clk = 0, rst_n = 0;
  uop_t uop; logic [7:0] opnd, sens; logic srdy;
  logic mem_we, sstart, gor_bit, standby; logic [7:0] mem_wd, morph_q;
  flags_t flags; logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  proc_core dut (.*);
  logic m_we, m_sstart, m_gor, m_stby; logic [7:0] m_wd, m_mq;
  flags_t m_flags; logic signed [ACC_W-1:0] m_acc;
  proc_core #(.HAS_ARITH(1'b0), .HAS_MORPH(1'b0)) dut_min (
    .clk, .rst_n, .uop, .opnd, .sens, .srdy, .mem_we(m_we), .mem_wd(m_wd),
    .sstart(m_sstart), .gor_bit(m_gor), .standby(m_stby), .flags(m_flags),
    .morph_q(m_mq), .acc(m_acc));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask

  // Put one instruction in the execute stage for one clock. Returns the
  // memory write strobe and data seen during that cycle.
  task automatic ex(input opcode_e op, input srca_e sa, input logic [8:0] imm,
                    input logic [7:0] d, output logic we, output logic [7:0] wd,
                    input cond_e c = C_AL, input dst_e dst = D_MEM, input logic [1:0] r = 0,
                    input logic sga = 1, input srcb_e sb = SB_IMM, input logic sgb = 1);
    @(negedge clk);
    uop = '0; uop.valid = 1; uop.ins.op = op; uop.ins.srca = sa; uop.ins.imm = imm;
    uop.ins.cond = c; uop.ins.dst = dst; uop.ins.rsel = r; uop.ins.sga = sga;
    uop.ins.srcb = sb; uop.ins.sgb = sgb;
    opnd = d;
    #1; we = mem_we; wd = mem_wd;
    @(posedge clk); #1; uop.valid = 0;
  endtask

  initial begin
    logic we; logic [7:0] wd;
    int k[9] = '{1, 2, 1, 0, 0, 0, -1, -2, -1};
    int p[9], s, sat;
    uop = '0; opnd = 0; sens = 0; srdy = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // ---- vertical Sobel-like weighted sum, /8, saturated ----
    for (int t = 0; t < 200; t++) begin
      s = 0;
      for (int j = 0; j < 9; j++) begin p[j] = $urandom_range(0, 255); s += k[j] * p[j]; end
      for (int j = 0; j < 9; j++)
        ex(j == 0 ? OP_MUL : OP_MACC, SA_MEM, 9'(k[j]), 8'(p[j]), we, wd, C_AL, D_MEM, 0, 0);
      chk("acc", acc, s);
      repeat (3) ex(OP_SHR, SA_MEM, 9'd1, 8'd0, we, wd);
      s = (s >= 0) ? s / 8 : -((-s + 7) / 8);
      ex(OP_SAT8, SA_MEM, 0, 0, we, wd, C_AL, D_MEM, 0, 1);
      sat = (s > 127) ? 127 : (s < -128) ? -128 : s;
      chk("sat8 we", we, 1); chk("sat8", wd, sat & 255);
      // square of the result with register operands: reg1 = sat, acc = reg1*reg0
      ex(OP_SAT8, SA_MEM, 0, 0, we, wd, C_AL, D_REG, 0, 1);           // reg0 = sat
      ex(OP_MOV, SA_REG, 0, 0, we, wd, C_AL, D_REG, 1);                // reg1 = reg0... via rsel
      ex(OP_MUL, SA_REG, 0, 0, we, wd, C_AL, D_REG, 0, 1, SB_REG0, 1); // acc = reg0*reg0
      chk("square", acc, sat * sat);
      ex(OP_SAT16, SA_MEM, 9'd1, 0, we, wd, C_AL, D_MEM, 0, 0);
      chk("sat16 hi", wd, ((sat * sat) >> 8) & 255);
    end
    // ---- compare and masked move ----
    for (int t = 0; t < 200; t++) begin
      int a, b;
      a = $urandom_range(0, 255); b = $urandom_range(0, 255);
      ex(OP_CMP, SA_MEM, 9'(b), 8'(a), we, wd, C_AL, D_MEM, 0, 0);
      ex(OP_MOV, SA_MEM, 0, 8'(a), we, wd, C_LT, D_MEM);
      chk("masked we", we, a < b);
      ex(OP_MOV, SA_MEM, 0, 8'(a), we, wd, C_GT, D_MEM);
      chk("masked we gt", we, a > b);
      chk("eq flag", flags.eq, a == b);
    end
    // ---- binary erosion with a 3-tap horizontal element ----
    for (int t = 0; t < 100; t++) begin
      logic [7:0] w0, w1, w2;
      w0 = 8'($urandom) | 8'($urandom); w1 = 8'($urandom) | 8'($urandom); w2 = 8'($urandom) | 8'($urandom);
      ex(OP_MLD, SA_MEM, 0, w0, we, wd);
      ex(OP_MAND, SA_MEM, 0, w1, we, wd);
      ex(OP_MANDN, SA_MEM, 0, ~w2, we, wd);
      ex(OP_MOV, SA_MORPH, 0, 0, we, wd, C_AL, D_MEM);
      chk("erosion", wd, w0 & w1 & w2);
      chk("zflag", flags.z, (w0 & w1 & w2) == 0);
    end
    // ---- bit field, sensor operand ----
    ex(OP_BFX, SA_MEM, {3'd0, 3'd2, 3'd3}, 8'b1011_0110, we, wd, C_AL, D_MEM);
    chk("bfx", wd, 3'b110);
    sens = 8'hA5;
    ex(OP_MOV, SA_SENS, 0, 0, we, wd, C_AL, D_MEM);
    chk("sens", wd, 8'hA5);
    // ---- standby: enter on a comparison, idle, wake on own data ----
    ex(OP_CMP, SA_MEM, 9'd10, 8'd10, we, wd, C_AL, D_MEM, 0, 0);
    ex(OP_STBY, SA_MEM, 0, 0, we, wd, C_EQ);
    chk("standby", standby, 1);
    ex(OP_MOV, SA_MEM, 0, 8'h33, we, wd);
    chk("idle no write", we, 0);
    ex(OP_WAKE, SA_MEM, 0, 8'h00, we, wd);
    chk("still standby", standby, 1);
    ex(OP_WAKE, SA_MEM, 0, 8'h01, we, wd);
    chk("woken", standby, 0);
    ex(OP_MOV, SA_MEM, 0, 8'h33, we, wd);
    chk("write again", we, 1);
    // ---- sensor ready feedback into F, masked copy ----
    srdy = 1;
    ex(OP_SRDY, SA_MEM, 0, 0, we, wd);
    chk("F ready", flags.f, 1);
    ex(OP_MOV, SA_SENS, 0, 0, we, wd, C_F, D_MEM);
    chk("copy when ready", we, 1);
    srdy = 0;
    ex(OP_SRDY, SA_MEM, 0, 0, we, wd);
    ex(OP_MOV, SA_SENS, 0, 0, we, wd, C_F, D_MEM);
    chk("no copy when not ready", we, 0);
    // ---- 16-bit operand: low byte then high byte ----
    ex(OP_LDA, SA_MEM, 0, 8'h34, we, wd, C_AL, D_MEM, 0, 0);
    ex(OP_LDAH, SA_MEM, 0, 8'hF2, we, wd, C_AL, D_MEM, 0, 1);
    chk("16-bit load", acc, -16'sd3532);
    ex(OP_ADD, SA_MEM, 0, 8'hCC, we, wd, C_AL, D_MEM, 0, 0);
    ex(OP_ADDH, SA_MEM, 0, 8'h0D, we, wd, C_AL, D_MEM, 0, 1);
    chk("16-bit add", acc, 32'sh0D00 + 32'sh00CC - 3532);
    // ---- sensor start pulse ----
    @(negedge clk); uop = '0; uop.valid = 1; uop.ins.op = OP_SSTART; #1;
    chk("sstart", sstart, 1);
    @(posedge clk); #1; uop.valid = 0; #1;
    chk("sstart off", sstart, 0);
    // ---- reduced configuration (no arithmetic, no morphology unit) ----
    for (int t = 0; t < 50; t++) begin
      int a, b;
      a = $urandom_range(1, 255); b = $urandom_range(0, 255);
      ex(OP_MUL, SA_MEM, 9'd3, 8'(a), we, wd, C_AL, D_MEM, 0, 0);
      chk("min acc", m_acc, 0);
      ex(OP_MLD, SA_MEM, 0, 8'(a), we, wd);
      chk("min morph", m_mq, 0);
      ex(OP_MOV, SA_MEM, 0, 8'(a), we, wd, C_AL, D_MEM);
      chk("min mov we", m_we, mem_we);
      chk("min mov", m_wd, a);
      ex(OP_CMP, SA_MEM, 9'(b), 8'(a), we, wd, C_AL, D_MEM, 0, 0);
      chk("min lt", m_flags.lt, a < b);
      chk("min gt", m_flags.gt, a > b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
