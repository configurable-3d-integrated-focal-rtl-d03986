// One processing element of the SIMD array. It has no program memory: every
// cycle it receives the execute-stage microinstruction broadcast by the array
// decoder, together with its operand from the neighbourhood arbiter (a byte of
// its own or a neighbour's memory, or a 1-bit-aligned binary row word) and a
// byte from its sensor buffer, plus the buffer's frame-ready feedback
// (`srdy`, read into flag F by SRDY). Around a crossbar sit the register bank, the
// arithmetic unit, the comparator, the morphology unit and the flag/standby
// logic. Results of MOV, SAT8, SAT16 and BFX go to a register or, through
// `mem_we`/`mem_wd`, to the own memory at the address the decoder supplies.
// All operations complete in the cycle they are in the execute stage.
// The module set follows the processor of the architecture, including its
// configurability: HAS_ARITH and HAS_MORPH leave out the arithmetic unit
// (multiplier, accumulator, shifter, saturation, bit field) or the morphology
// unit when an array does not need them. Their results then read as zero and
// they set no flags. The defaults include both, as in the full-featured array.
// The single-cycle execute stage is this design's choice.
module proc_core
  import xenon_pkg::*;
#(
  parameter bit HAS_ARITH = 1'b1,
  parameter bit HAS_MORPH = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  uop_t       uop,
  input  logic [7:0] opnd,
  input  logic [7:0] sens,
  input  logic       srdy,
  output logic       mem_we,
  output logic [7:0] mem_wd,
  output logic       sstart,
  output logic       gor_bit,
  output logic       standby,
  output flags_t     flags,
  output logic [7:0] morph_q,
  output logic signed [ACC_W-1:0] acc
);
  instr_t            i;
  logic [7:0]        reg_rd, reg0, a, res, result;
  logic signed [8:0] b9;
  logic              exec_en, cond_val;
  logic              ar_upd, ar_z, ar_n, ar_v, mo_upd, mo_z, c_eq, c_lt, c_gt;
  logic              wr;

  assign i = uop.ins;

  core_xbar u_xbar (
    .srca(i.srca), .srcb(i.srcb), .sgb(i.sgb), .mem(opnd), .reg_rd, .reg0,
    .imm(i.imm), .sens, .morph(morph_q), .accl(acc[7:0]), .a, .b9);

  if (HAS_ARITH) begin : g_arith
    arith_unit u_arith (
      .clk, .rst_n, .en(exec_en), .op(i.op), .a, .b9, .sga(i.sga), .imm(i.imm),
      .acc, .res, .fl_upd(ar_upd), .fl_z(ar_z), .fl_n(ar_n), .fl_v(ar_v));
  end else begin : g_no_arith
    assign acc    = '0;
    assign res    = '0;
    assign ar_upd = 1'b0;
    assign ar_z   = 1'b0;
    assign ar_n   = 1'b0;
    assign ar_v   = 1'b0;
  end

  cmp_unit u_cmp (.a, .sga(i.sga), .b9, .eq(c_eq), .lt(c_lt), .gt(c_gt));

  if (HAS_MORPH) begin : g_morph
    morph_unit #(.NBITS(8)) u_morph (
      .clk, .rst_n, .en(exec_en), .op(i.op), .w(opnd), .q(morph_q),
      .is_morph(mo_upd), .z(mo_z));
  end else begin : g_no_morph
    assign morph_q = '0;
    assign mo_upd  = 1'b0;
    assign mo_z    = 1'b0;
  end

  flag_standby u_flags (
    .clk, .rst_n, .valid(uop.valid), .op(i.op), .cond(i.cond), .a,
    .ar_upd, .ar_z, .ar_n, .ar_v, .mo_upd, .mo_z, .c_eq, .c_lt, .c_gt, .srdy,
    .flags, .cond_val, .exec_en, .gor_bit, .standby);

  assign result = (i.op == OP_MOV) ? a : res;
  assign wr     = exec_en & writes_dst(i.op);

  reg_bank #(.NREGS(NREGS)) u_regs (
    .clk, .rst_n, .we(wr & (i.dst == D_REG)), .wsel(i.rsel), .wd(result),
    .rsel(i.rsel), .rd(reg_rd), .r0(reg0));

  assign mem_we = wr & (i.dst == D_MEM);
  assign mem_wd = result;
  assign sstart = exec_en & (i.op == OP_SSTART);
endmodule
