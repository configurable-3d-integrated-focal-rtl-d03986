// Self-checking test of instr_decoder: a random instruction stream (index
// updates, byte and bit-mode reads with neighbour offsets, memory writes,
// GOR) is offered from a queue with random gaps. A reference model computes
// the read address and source processor offset in global pixel coordinates
// (floor division of the shifted pixel position by the tile size), the write
// address, the stall rule and the pipeline contents. Stalls and GOR results
// are counted and must occur.
module tb_instr_decoder;
  import xenon_pkg::*;
  localparam int TILE = 8, NPE = 4;
  logic clk = 0, rst_n = 0;
  instr_t ins; logic empty, pop;
  logic [MEM_AW-1:0] mem_addr; logic [5:0] idx;
  uop_t uop; logic stall, busy;
  logic [NPE-1:0] gor_bits; logic gor, gor_valid;
  instr_t q[$];
  int checks = 0, failures = 0, n_stall = 0, n_gor = 0;
  // reference state
  int m_idx; uop_t m_uop; logic gap;

  instr_decoder #(.TILE(TILE), .NPE(NPE)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  task automatic chk(string w, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  initial begin
    opcode_e ops[9] = '{OP_SETIDX, OP_INCIDX, OP_MOV, OP_ADD, OP_MAND, OP_SAT8, OP_MOV, OP_GOR, OP_CLRACC};
    int lx, ly, gx, gy, ra, wa, sxx, syy;
    logic ew;
    gap = 0; gor_bits = '0; empty = 1; ins = '0; m_idx = 0; m_uop = '0;
    for (int n = 0; n < 3000; n++) begin
      instr_t i;
      i = instr_t'({$urandom, $urandom});
      i.op = ops[$urandom_range(0, 8)];
      if (i.dx == -4'sd8) i.dx = 0;
      if (i.dy == -4'sd8) i.dy = 0;
      i.addr = 9'($urandom_range(0, 400));
      i.srca = ($urandom_range(0, 1) != 0) ? SA_MEM : SA_REG;
      q.push_back(i);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    while (q.size() != 0) begin
      @(negedge clk);
      gap = ($urandom_range(0, 5) == 0);
      gor_bits = NPE'($urandom);
      empty = gap || (q.size() == 0);
      ins   = (q.size() != 0) ? q[0] : '0;
      #1;
      // expected issue-stage outputs
      ew = m_uop.valid && writes_dst(m_uop.ins.op) && m_uop.ins.dst == D_MEM;
      lx = ins.use_idx ? (m_idx % TILE) : 0;
      ly = ins.use_idx ? (m_idx / TILE) : 0;
      gx = lx + int'(ins.dx); gy = ly + int'(ins.dy);
      sxx = ins.bmode ? 0 : fdiv(gx, TILE); syy = fdiv(gy, TILE);
      if (ins.bmode) begin
        ra = int'(ins.addr) + (gy - syy * TILE); wa = int'(ins.addr) + ly;
      end else begin
        ra = int'(ins.addr) + (gy - syy * TILE) * TILE + (gx - sxx * TILE);
        wa = int'(ins.addr) + ly * TILE + lx;
      end
      chk("idx", idx, m_idx);
      chk("stall", stall, !empty && ew && reads_mem(ins));
      chk("pop", pop, !empty && !(ew && reads_mem(ins)));
      chk("busy", busy, !empty || m_uop.valid);
      if (ew) chk("waddr_port", mem_addr, m_uop.waddr);
      else if (!empty) chk("raddr", mem_addr, ra % 512);
      if (stall) n_stall++;
      @(posedge clk);
      if (m_uop.valid && m_uop.ins.op == OP_GOR) begin
        #1; chk("gor", gor, |gor_bits); chk("gor_valid", gor_valid, 1); n_gor++;
      end
      m_uop.valid = 0;
      if (!empty && !(ew && reads_mem(ins))) begin
        if (ins.op == OP_SETIDX) m_idx = int'(ins.imm[5:0]);
        else if (ins.op == OP_INCIDX) m_idx = (m_idx + 1) % 64;
        else begin
          m_uop.valid = 1; m_uop.ins = ins; m_uop.waddr = 9'(wa);
          m_uop.sx = 2'(sxx); m_uop.sy = 2'(syy);
        end
        void'(q.pop_front());
      end
      #1;
      chk("uop", uop, m_uop);
    end
    chk("stalls seen", n_stall > 10, 1);
    chk("gor seen", n_gor > 10, 1);
    $display("stalls %0d, global OR evaluations %0d", n_stall, n_gor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
