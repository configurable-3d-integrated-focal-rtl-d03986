// Self-checking test of core_xbar: every A source and both B sources with
// random data, including sign extension of register 0.
module tb_core_xbar;
  import xenon_pkg::*;
  srca_e srca; srcb_e srcb; logic sgb;
  logic [7:0] mem, reg_rd, reg0, sens, morph, accl, a; logic [8:0] imm;
  logic signed [8:0] b9;
  int checks = 0, failures = 0;
  logic clk = 0;
  core_xbar dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] ea; int eb;
    for (int n = 0; n < 3000; n++) begin
      mem = 8'($urandom); reg_rd = 8'($urandom); reg0 = 8'($urandom); sens = 8'($urandom);
      morph = 8'($urandom); accl = 8'($urandom); imm = 9'($urandom); sgb = 1'($urandom);
      srca = srca_e'($urandom_range(0, 5)); srcb = srcb_e'($urandom_range(0, 1));
      case (srca)
        SA_MEM: ea = mem; SA_REG: ea = reg_rd; SA_IMM: ea = imm[7:0];
        SA_SENS: ea = sens; SA_MORPH: ea = morph; default: ea = accl;
      endcase
      if (srcb == SB_IMM) eb = (imm > 255) ? int'(imm) - 512 : int'(imm);
      else eb = (sgb && reg0 > 127) ? int'(reg0) - 256 : int'(reg0);
      #1; checks += 2;
      if (a != ea)      begin failures++; $display("FAIL a"); end
      if (int'(b9) != eb) begin failures++; $display("FAIL b %0d %0d", b9, eb); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
