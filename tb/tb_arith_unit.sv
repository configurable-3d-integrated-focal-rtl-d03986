// Self-checking test of arith_unit: random sequences of accumulator
// operations (load, add, subtract, multiply, multiply-add, shifts, clear) on
// signed and unsigned operands, 16-bit high-byte load/add, compared with an integer reference model;
// saturation to 8 and 16 bits and bit-field extraction are checked on the
// result byte and the V flag.
module tb_arith_unit;
  import xenon_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  opcode_e op;
  logic [7:0] a;
  logic signed [8:0] b9;
  logic sga;
  logic [8:0] imm;
  logic signed [23:0] acc;
  logic [7:0] res;
  logic fl_upd, fl_z, fl_n, fl_v;
  int checks = 0, failures = 0;
  longint m;   // reference accumulator

  arith_unit dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap24(longint v);
    longint r = v & 64'hFFFFFF;
    if (r >= 64'h800000) r -= 64'h1000000;
    return r;
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    opcode_e ops[10] = '{OP_CLRACC, OP_LDA, OP_ADD, OP_SUB, OP_MUL, OP_MACC, OP_SHL, OP_SHR,
                         OP_LDAH, OP_ADDH};
    longint av, bv, lo, hi, s;
    op = OP_NOP; a = 0; b9 = 0; sga = 0; imm = 0; m = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      op  = ops[$urandom_range(0, 9)];
      a   = 8'($urandom); b9 = 9'($urandom); sga = 1'($urandom);
      imm = 9'($urandom_range(0, 6));
      en  = 1;
      av  = sga ? longint'($signed(a)) : longint'(a);
      bv  = longint'(b9);
      case (op)
        OP_CLRACC: m = 0;
        OP_LDA:    m = av;
        OP_ADD:    m = wrap24(m + av);
        OP_SUB:    m = wrap24(m - av);
        OP_MUL:    m = av * bv;
        OP_MACC:   m = wrap24(m + av * bv);
        OP_SHL:    m = wrap24(m * (longint'(1) << imm[4:0]));
        OP_SHR:    m = m >>> imm[4:0];
        OP_LDAH:   m = wrap24(av * 256 + (m & 255));
        OP_ADDH:   m = wrap24(m + av * 256);
        default: ;
      endcase
      @(posedge clk); #1;
      chk("acc", longint'(acc), m);
      // saturation and bit field, combinational on the current accumulator
      en = 0;
      for (int w = 0; w < 2; w++) begin
        op = w ? OP_SAT16 : OP_SAT8;
        imm = 9'($urandom_range(0, 1));
        if (w == 0) begin lo = sga ? -128 : 0; hi = sga ? 127 : 255; end
        else begin lo = sga ? -32768 : 0; hi = sga ? 32767 : 65535; end
        s = (m > hi) ? hi : (m < lo) ? lo : m;
        #1;
        chk("sat", longint'(res), w ? ((s >> (imm[0] ? 8 : 0)) & 255) : (s & 255));
        chk("satv", longint'(fl_v), longint'(m > hi || m < lo));
      end
      op = OP_BFX; imm = 9'($urandom_range(0, 63)); #1;
      chk("bfx", longint'(res), (longint'(a) >> imm[2:0]) & ((1 << (imm[5:3] + 1)) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
