// Self-checking test of data_mem: random byte accesses on port A (core clock)
// and 32-bit accesses with byte enables on port B (a slower data clock),
// against a reference byte array. The two ports never write the same word at
// once; read latency is one clock on both ports.
module tb_data_mem;
  logic clka = 0, clkb = 0;
  logic wea = 0; logic [8:0] addra = 0; logic [7:0] dina = 0, douta;
  logic enb = 0; logic [3:0] web = 0; logic [6:0] addrb = 0; logic [31:0] dinb = 0, doutb;
  logic [7:0] m [512];
  int checks = 0, failures = 0;
  data_mem dut (.*);
  always #5 clka = ~clka;
  always #7 clkb = ~clkb;
  initial begin : watchdog
    repeat (100000) @(posedge clka);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // port A: lower half of the memory is written only by port A
  initial begin
    for (int i = 0; i < 512; i++) m[i] = 0;
    // initialise through port A
    for (int i = 0; i < 512; i++) begin
      @(negedge clka); wea = 1; addra = 9'(i); dina = 8'(i * 7);
      m[i] = 8'(i * 7);
    end
    @(negedge clka); wea = 0;
    fork
      for (int n = 0; n < 3000; n++) begin
        logic [8:0] ad; logic w; logic [7:0] d;
        @(negedge clka);
        ad = {1'b0, 8'($urandom)}; w = 1'($urandom); d = 8'($urandom);
        wea = w; addra = ad; dina = d;
        @(posedge clka); #1;
        if (!w) begin
          checks++;
          if (douta != m[ad]) begin failures++; $display("FAIL A %0d", ad); end
        end
        if (w) m[ad] = d;
      end
      for (int n = 0; n < 2000; n++) begin
        logic [6:0] ad; logic [3:0] be; logic [31:0] d;
        @(negedge clkb);
        ad = {1'b1, 6'($urandom)}; be = 4'($urandom); d = $urandom;
        enb = 1; web = be; addrb = ad; dinb = d;
        @(posedge clkb); #1;
        checks++;
        if (doutb != {m[4*ad+3], m[4*ad+2], m[4*ad+1], m[4*ad]}) begin
          failures++; $display("FAIL B %0d", ad);
        end
        for (int k = 0; k < 4; k++) if (be[k]) m[4*ad+k] = d[8*k +: 8];
      end
    join
    // cross check: port A sees port B writes and vice versa
    for (int i = 0; i < 512; i += 3) begin
      @(negedge clka); wea = 0; addra = 9'(i);
      @(posedge clka); #1; checks++;
      if (douta != m[i]) begin failures++; $display("FAIL X %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
