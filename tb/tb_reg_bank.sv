// Self-checking test of reg_bank: random writes and reads against a
// reference array, checking both read ports.
module tb_reg_bank;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] wsel, rsel; logic [7:0] wd, rd, r0;
  logic [7:0] m [4];
  int checks = 0, failures = 0;
  reg_bank dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    m = '{default: 0}; wsel = 0; rsel = 0; wd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); wsel = 2'($urandom); wd = 8'($urandom); rsel = 2'($urandom);
      #1; checks += 2;
      if (rd != m[rsel]) begin failures++; $display("FAIL rd"); end
      if (r0 != m[0])    begin failures++; $display("FAIL r0"); end
      @(posedge clk);
      if (we) m[wsel] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
