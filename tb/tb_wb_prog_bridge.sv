// Self-checking test of wb_prog_bridge: random instructions are written as
// two Wishbone words while a slow consumer models the program buffer's full
// flag; the pushed instructions must match in order, ACK must be withheld
// while full (counted, must occur), and the status word must reflect the
// synchronised status inputs and count global-OR toggles. The transfer CRC
// (word 3) is compared with a bit-serial CCITT model every 20 instructions;
// writing the right value must set the pass bit, a wrong one the sticky
// error bit.
module tb_wb_prog_bridge;
  import xenon_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wb_cyc = 0, wb_stb = 0, wb_we = 0; logic [1:0] wb_adr = 0;
  logic [31:0] wb_dat_i = 0, wb_dat_o; logic wb_ack;
  logic push; instr_t pdata; logic full = 0;
  logic gor_a = 0, gor_tgl_a = 0, busy_a = 0, sens_rdy_a = 0;
  instr_t q[$];
  int checks = 0, failures = 0, n_hold = 0, got = 0;
  wb_prog_bridge dut (.*);
  logic [15:0] m_crc = 16'hFFFF;
  function automatic logic [15:0] fold(logic [15:0] c, logic [31:0] w);
    for (int k = 31; k >= 0; k--) begin
      logic fb;
      fb = c[15] ^ w[k];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wb_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); wb_cyc = 1; wb_stb = 1; wb_we = 1; wb_adr = a; wb_dat_i = d;
    do @(posedge clk); while (!wb_ack);
    #1; wb_cyc = 0; wb_stb = 0;
  endtask
  task automatic wb_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk); wb_cyc = 1; wb_stb = 1; wb_we = 0; wb_adr = a;
    do @(posedge clk); while (!wb_ack);
    #1; d = wb_dat_o; wb_cyc = 0; wb_stb = 0;
  endtask

  // consumer: full asserts randomly; pushes are compared with the queue
  always @(posedge clk) begin
    if (push) begin
      checks++;
      if (q.size() == 0 || pdata != q[0]) begin failures++; $display("FAIL push data"); end
      else void'(q.pop_front());
      got++;
    end
    if (wb_cyc && wb_stb && wb_we && wb_adr == 1 && full && !wb_ack) n_hold++;
  end
  always @(negedge clk) full <= ($urandom_range(0, 2) == 0);

  initial begin
    logic [31:0] st;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [63:0] w; instr_t i;
      w = {$urandom, $urandom};
      i = instr_t'(w[INSTR_W-1:0]);
      q.push_back(i);
      wb_write(0, w[31:0]);
      wb_write(1, w[63:32]);
      m_crc = fold(fold(m_crc, w[31:0]), w[63:32]);
      if (n % 20 == 19) begin
        wb_read(3, st);
        checks++;
        if (st[15:0] != m_crc) begin failures++; $display("FAIL crc %h exp %h", st[15:0], m_crc); end
        wb_write(3, {16'd0, m_crc});
        m_crc = 16'hFFFF;
        wb_read(2, st);
        checks++;
        if (st[5:4] != 2'b01) begin failures++; $display("FAIL crc pass bits %b", st[5:4]); end
      end
    end
    repeat (3) @(posedge clk);
    checks += 2;
    if (got != 300 || q.size() != 0) begin failures++; $display("FAIL count %0d", got); end
    if (n_hold == 0) begin failures++; $display("FAIL never held while full"); end
    // status
    gor_a = 1; busy_a = 0; sens_rdy_a = 1;
    for (int t = 0; t < 5; t++) begin gor_tgl_a = ~gor_tgl_a; repeat (4) @(posedge clk); end
    @(negedge clk); full = 0;
    wb_read(2, st);
    checks++;
    if (st[0] != 1 || st[1] != 0 || st[3] != 1 || st[15:8] != 5) begin
      failures++; $display("FAIL status %h", st);
    end
    wb_write(0, 32'h1234_5678);
    wb_write(3, {16'd0, ~fold(16'hFFFF, 32'h1234_5678)});
    wb_read(2, st);
    checks++;
    if (st[5:4] != 2'b10) begin failures++; $display("FAIL crc error bits %b", st[5:4]); end
    $display("held while full %0d cycles", n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
