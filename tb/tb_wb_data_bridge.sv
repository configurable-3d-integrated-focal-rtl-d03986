// Self-checking test of wb_data_bridge with NPE small behavioural memories
// (32-bit words, byte enables, one-clock read latency, like port B of the
// processor memories): random writes and reads over the whole address map
// against a reference array; only the addressed memory may be enabled.
// Region 1 (address MSB) must return the sensor window word of the addressed
// processor and must never enable a memory, even for writes.
module tb_wb_data_bridge;
  localparam int NPE = 64, DEPTH = 512, AW = 14;
  logic clk = 0, rst_n = 0;
  logic wb_cyc = 0, wb_stb = 0, wb_we = 0; logic [AW-1:0] wb_adr = 0;
  logic [3:0] wb_sel = 0; logic [31:0] wb_dat_i = 0, wb_dat_o; logic wb_ack;
  logic [NPE-1:0] m_en; logic [3:0] m_we; logic [6:0] m_addr; logic [31:0] m_wdata;
  logic [NPE-1:0][31:0] m_rdata, s_rdata;
  logic [31:0] mem [NPE][128];
  logic [31:0] ref_m [NPE][128];
  int checks = 0, failures = 0;
  wb_data_bridge #(.NPE(NPE), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    checks++;
    if ($countones(m_en) > 1) begin failures++; $display("FAIL several enables"); end
    for (int p = 0; p < NPE; p++)
      if (m_en[p]) begin
        for (int k = 0; k < 4; k++) if (m_we[k]) mem[p][m_addr][8*k +: 8] <= m_wdata[8*k +: 8];
        m_rdata[p] <= mem[p][m_addr];
      end
    // sensor window model: registered word derived from processor and address
    for (int p = 0; p < NPE; p++) s_rdata[p] <= {8'(p), 8'hA5, 9'(m_addr), 7'(p * 3)};
  end
  initial begin
    for (int p = 0; p < NPE; p++) for (int a = 0; a < 128; a++) begin mem[p][a] = 0; ref_m[p][a] = 0; end
    m_rdata = '0; s_rdata = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [AW-1:0] a; logic w; logic [3:0] be; logic [31:0] d;
      a = AW'($urandom); w = 1'($urandom); be = 4'($urandom); d = $urandom;
      @(negedge clk); wb_cyc = 1; wb_stb = 1; wb_we = w; wb_adr = a; wb_sel = be; wb_dat_i = d;
      #1;
      if (a[13]) begin
        checks++;
        if (m_en != 0) begin failures++; $display("FAIL sensor window enabled a memory %h", a); end
      end
      do begin @(posedge clk); #1; end while (!wb_ack);
      if (a[13]) begin
        if (!w) begin
          checks++;
          if (wb_dat_o != {8'(a[12:7]), 8'hA5, 9'(a[6:0]), 7'(a[12:7] * 3)}) begin
            failures++; $display("FAIL window read %h %h", a, wb_dat_o);
          end
        end
      end else if (!w) begin
        checks++;
        if (wb_dat_o != ref_m[a[12:7]][a[6:0]]) begin failures++; $display("FAIL read %h got %h exp %h", a, wb_dat_o, ref_m[a[12:7]][a[6:0]]); end
      end else
        for (int k = 0; k < 4; k++) if (be[k]) ref_m[a[12:7]][a[6:0]][8*k +: 8] = d[8*k +: 8];
      wb_cyc = 0; wb_stb = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
