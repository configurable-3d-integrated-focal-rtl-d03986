// Self-checking test of flag_standby: random instruction streams (arithmetic
// and morphology flag updates, CMP, CLRF, SETF, STBY, WAKE, GOR, SRDY) with random
// conditions and unit outputs, against a reference model of the flags,
// masking, standby and global-OR bit. Counts standby entries and wake-ups.
module tb_flag_standby;
  import xenon_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  opcode_e op; cond_e cond; logic [7:0] a;
  logic ar_upd, ar_z, ar_n, ar_v, mo_upd, mo_z, c_eq, c_lt, c_gt, srdy;
  flags_t flags; logic cond_val, exec_en, gor_bit, standby;
  flags_t mf; logic ms;
  int checks = 0, failures = 0, n_stby = 0, n_wake = 0;

  flag_standby dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ev(cond_e c, flags_t f);
    case (c)
      C_AL: return 1; C_Z: return f.z; C_NZ: return !f.z; C_N: return f.n;
      C_LT: return f.lt; C_GT: return f.gt; C_EQ: return f.eq; default: return f.f;
    endcase
  endfunction

  initial begin
    opcode_e ops[9] = '{OP_ADD, OP_MAND, OP_CMP, OP_CLRF, OP_SETF, OP_STBY, OP_WAKE, OP_GOR, OP_SRDY};
    logic cv, en, ctl;
    mf = '0; ms = 0; op = OP_NOP; cond = C_AL; a = 0;
    {ar_upd, ar_z, ar_n, ar_v, mo_upd, mo_z, c_eq, c_lt, c_gt, srdy} = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      valid = ($urandom_range(0, 9) != 0);
      op = ops[$urandom_range(0, 8)];
      srdy = 1'($urandom);
      cond = cond_e'($urandom_range(0, 7));
      a = ($urandom_range(0, 1) != 0) ? 8'd0 : 8'($urandom);
      {ar_z, ar_n, ar_v, mo_z, c_eq, c_lt, c_gt} = 7'($urandom);
      ar_upd = (op == OP_ADD); mo_upd = (op == OP_MAND);
      cv  = ev(cond, mf);
      ctl = op inside {OP_STBY, OP_SETF, OP_WAKE, OP_GOR};
      en  = valid && !ms && cv && !ctl;
      #1;
      checks += 3;
      if (cond_val != cv) begin failures++; $display("FAIL cond_val"); end
      if (exec_en != en)  begin failures++; $display("FAIL exec_en"); end
      if (gor_bit != ((cond == C_AL) ? !ms : cv)) begin failures++; $display("FAIL gor"); end
      @(posedge clk);
      if (en && op == OP_CLRF) mf = '0;
      if (en && ar_upd) begin mf.z = ar_z; mf.n = ar_n; mf.v = ar_v; end
      if (en && mo_upd) mf.z = mo_z;
      if (en && op == OP_CMP) begin mf.eq = c_eq; mf.lt = c_lt; mf.gt = c_gt; end
      if (valid && !ms && op == OP_SETF) mf.f = cv;
      if (en && op == OP_SRDY) mf.f = srdy;
      if (valid && !ms && op == OP_STBY && cv) begin ms = 1; n_stby++; end
      else if (valid && ms && op == OP_WAKE && a != 0) begin ms = 0; n_wake++; end
      #1;
      checks += 2;
      if (flags != mf)   begin failures++; $display("FAIL flags %b exp %b", flags, mf); end
      if (standby != ms) begin failures++; $display("FAIL standby"); end
    end
    checks++;
    if (n_stby < 10 || n_wake < 10) begin failures++; $display("FAIL too few standby events"); end
    $display("standby entries %0d, wake-ups %0d", n_stby, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
