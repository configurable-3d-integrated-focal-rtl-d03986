// Self-checking test of a reduced array configuration: 2x2 processors with
// neither data memories nor arithmetic nor morphology units, only sensing,
// registers, the comparator, flags and the global OR. With an ideal analog
// model (tile k, pixel p presents code (k*53 + p*11 + 5) mod 256) the host:
//   1. starts a conversion of every tile and waits for the frame-ready status;
//   2. for each pixel position compares the sensor byte with a threshold and
//      evaluates the array-wide OR of "pixel > threshold", which must match
//      the reference for every position;
//   3. reads every tile's frame through the data bus sensor window, and
//      checks that the (absent) data memories read as zero.
module tb_xenon_lite;
  import xenon_pkg::*;
  localparam int NX = 2, NY = 2, NPE = 4, T = 8, THR = 200;
  logic clk_core = 0, clk_prog = 0, clk_data = 0, clk_adc = 0, rst_n = 0;
  logic pwb_cyc = 0, pwb_stb = 0, pwb_we = 0; logic [1:0] pwb_adr = 0;
  logic [31:0] pwb_dat_i = 0, pwb_dat_o; logic pwb_ack;
  logic dwb_cyc = 0, dwb_stb = 0, dwb_we = 0; logic [9:0] dwb_adr = 0;
  logic [3:0] dwb_sel = 0; logic [31:0] dwb_dat_i = 0, dwb_dat_o; logic dwb_ack;
  logic [NPE-1:0] pix_rst, adc_sample, adc_cmp; logic [NPE-1:0][5:0] pix_sel;
  logic [NPE-1:0][7:0] adc_dac;
  logic gor, gor_valid, busy, stall; logic [NPE-1:0] pe_standby;
  int checks = 0, failures = 0, n_gor = 0;
  logic gq[$];

  xenon_top #(.NX(NX), .NY(NY), .HAS_MEM(1'b0), .HAS_ARITH(1'b0), .HAS_MORPH(1'b0)) dut (.*);

  always #10 clk_core = ~clk_core;
  always #2 clk_prog = ~clk_prog;
  always #4 clk_data = ~clk_data;
  always #7 clk_adc  = ~clk_adc;

  initial begin : watchdog
    repeat (100000) @(posedge clk_core);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scode(int k, int p); return (k * 53 + p * 11 + 5) & 255; endfunction
  always_comb
    for (int k = 0; k < NPE; k++) adc_cmp[k] = scode(k, int'(pix_sel[k])) >= int'(adc_dac[k]);

  always @(posedge clk_core) if (rst_n && gor_valid) begin
    n_gor++; checks++;
    if (gq.size() == 0 || gor != gq[0]) begin failures++; $display("FAIL global OR %0d", n_gor); end
    if (gq.size() != 0) void'(gq.pop_front());
  end

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
  task automatic drd(input logic region, input int k, input int word, output logic [31:0] d);
    @(negedge clk_data); dwb_cyc = 1; dwb_stb = 1; dwb_we = 0;
    dwb_adr = {region, 2'(k), 7'(word)};
    do @(posedge clk_data); while (!dwb_ack);
    #1; d = dwb_dat_o; dwb_cyc = 0; dwb_stb = 0;
  endtask
  function automatic instr_t mk(opcode_e op, srca_e sa = SA_MEM, int imm = 0, cond_e c = C_AL);
    instr_t i;
    i = '0; i.op = op; i.srca = sa; i.imm = 9'(imm); i.cond = c; i.use_idx = 1'b1;
    return i;
  endfunction
  task automatic issue(input instr_t i);
    logic [63:0] w;
    w = 64'(i);
    pwr(0, w[31:0]);
    pwr(1, w[63:32]);
  endtask
  task automatic wait_idle();
    logic [31:0] st;
    do prd(2, st); while (st[1] || !dut.f_empty);
    repeat (4) @(posedge clk_core);
  endtask

  initial begin
    logic [31:0] st, d;
    repeat (3) @(posedge clk_core); rst_n = 1;
    repeat (3) @(posedge clk_core);
    // 1. conversion
    issue(mk(OP_SSTART));
    wait_idle();
    do prd(2, st); while (!st[3]);
    // 2. threshold and global OR per pixel position
    issue(mk(OP_SETIDX, SA_IMM, 0));
    for (int p = 0; p < T * T; p++) begin
      bit any;
      any = 0;
      for (int k = 0; k < NPE; k++) if (scode(k, p) > THR) any = 1;
      gq.push_back(any);
      issue(mk(OP_CMP, SA_SENS, THR));
      issue(mk(OP_GOR, SA_MEM, 0, C_GT));
      issue(mk(OP_INCIDX));
    end
    wait_idle();
    checks++;
    if (n_gor != T * T || gq.size() != 0) begin failures++; $display("FAIL %0d global OR results", n_gor); end
    // 3. sensor window and absent memories
    for (int k = 0; k < NPE; k++)
      for (int w = 0; w < T * T / 4; w++) begin
        drd(1'b1, k, w, d);
        for (int b = 0; b < 4; b++) begin
          checks++;
          if (int'(d[8 * b +: 8]) != scode(k, 4 * w + b)) begin
            failures++; $display("FAIL window k%0d p%0d", k, 4 * w + b);
          end
        end
        drd(1'b0, k, w, d);
        checks++;
        if (d != 0) begin failures++; $display("FAIL absent memory reads %h", d); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
