// Self-checking test of morph_unit: random sequences of load/AND/OR/AND-NOT/
// OR-NOT/XOR on the eight single-bit processors against a reference byte,
// including the zero indication and a disabled cycle.
module tb_morph_unit;
  import xenon_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  opcode_e op; logic [7:0] w, q; logic is_morph, z;
  logic [7:0] m;
  int checks = 0, failures = 0;
  morph_unit dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    opcode_e ops[6] = '{OP_MLD, OP_MAND, OP_MOR, OP_MANDN, OP_MORN, OP_MXOR};
    logic [7:0] nx;
    op = OP_NOP; w = 0; m = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      op = ops[$urandom_range(0, 5)];
      w  = ($urandom_range(0, 3) == 0) ? 8'hFF : 8'($urandom);
      en = ($urandom_range(0, 7) != 0);
      case (op)
        OP_MLD: nx = w; OP_MAND: nx = m & w; OP_MOR: nx = m | w;
        OP_MANDN: nx = m & ~w; OP_MORN: nx = m | ~w; default: nx = m ^ w;
      endcase
      #1; checks++;
      if (z != (nx == 0)) begin failures++; $display("FAIL z"); end
      @(posedge clk); #1;
      if (en) m = nx;
      checks++;
      if (q !== m) begin failures++; $display("FAIL q=%h exp %h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
