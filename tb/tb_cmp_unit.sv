// Self-checking test of cmp_unit: exhaustive A (both signednesses) against
// random 9-bit B values, compared with integer relations.
module tb_cmp_unit;
  logic [7:0] a; logic sga; logic signed [8:0] b9; logic eq, lt, gt;
  int checks = 0, failures = 0;
  logic clk = 0;
  cmp_unit dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int av, bv;
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 256; x++)
        for (int r = 0; r < 8; r++) begin
          a = 8'(x); sga = 1'(s); b9 = (r == 0) ? 9'(x) : 9'($urandom);
          av = s ? int'($signed(8'(x))) : x;
          bv = int'(b9);
          #1;
          checks++;
          if (eq != (av == bv) || lt != (av < bv) || gt != (av > bv)) begin
            failures++;
            $display("FAIL a=%0d b=%0d eq%0b lt%0b gt%0b", av, bv, eq, lt, gt);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
