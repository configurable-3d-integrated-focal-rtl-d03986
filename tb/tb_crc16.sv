// Self-checking test of crc16. A byte-wide instance must give the standard
// check value 0x29B1 for the ASCII string "123456789" (CCITT polynomial,
// initial value 0xFFFF, no reflection). A 32-bit instance is compared with
// a bit-at-a-time model written here, over random streams with clears in
// between, and must take one clock per word.
module tb_crc16;
  logic clk = 0, rst_n = 0;
  logic clr8 = 0, en8 = 0; logic [7:0] d8 = 0; logic [15:0] crc8;
  logic clr = 0, en = 0; logic [31:0] d = 0; logic [15:0] crc;
  int checks = 0, failures = 0;
  crc16 #(.DW(8))  dut8 (.clk, .rst_n, .clr(clr8), .en(en8), .d(d8), .crc(crc8));
  crc16 #(.DW(32)) dut  (.clk, .rst_n, .clr, .en, .d, .crc);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: one message bit at a time, message bit XOR register MSB
  function automatic logic [15:0] ref_bit(logic [15:0] c, logic b);
    logic fb;
    fb = c[15] ^ b;
    c = {c[14:0], 1'b0};
    if (fb) c = c ^ 16'h1021;
    return c;
  endfunction

  initial begin
    string s;
    logic [15:0] m;
    s = "123456789";
    repeat (2) @(posedge clk); rst_n = 1;
    // standard check value
    for (int k = 0; k < s.len(); k++) begin
      @(negedge clk); en8 = 1; d8 = s[k];
    end
    @(negedge clk); en8 = 0;
    checks++;
    if (crc8 != 16'h29B1) begin failures++; $display("FAIL check value %h", crc8); end
    // random 32-bit streams against the bit-serial model
    for (int n = 0; n < 200; n++) begin
      int len;
      len = $urandom_range(1, 12);
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      m = 16'hFFFF;
      checks++;
      if (crc != m) begin failures++; $display("FAIL clear %h", crc); end
      for (int w = 0; w < len; w++) begin
        @(negedge clk); en = 1; d = $urandom;
        for (int k = 31; k >= 0; k--) m = ref_bit(m, d[k]);
        @(posedge clk); #1;
        checks++;
        if (crc != m) begin failures++; $display("FAIL stream %0d word %0d %h exp %h", n, w, crc, m); end
      end
      @(negedge clk); en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
