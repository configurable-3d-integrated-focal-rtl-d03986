// Flags, conditional execution and standby of one processor.
// Holds the state flags (Z, N, V from the arithmetic/morphology units, EQ/LT/GT
// from the comparator, user flag F) and evaluates the instruction's condition
// field against them. Most operations are masked by the condition: `exec_en`
// is high only when the processor is awake and the condition holds, so
// content-dependent masks enable an operation at some pixels only. STBY puts
// the processor into standby when its condition holds; a standby processor
// executes nothing except WAKE, which leaves standby when its operand A
// (typically from the processor's own memory, which keeps working) is
// non-zero. SETF copies the condition into F. GOR reports the condition, or
// with condition "always" whether the processor is awake, for the array-wide OR.
// SRDY copies the sensor tile's frame-ready feedback (`srdy`) into F.
// Timing: combinational enables, flags and standby update at the clock edge.
// Masking, standby entry by a comparison/bit result and wake on own data follow
// the architecture; the condition codes and the WAKE rule are this design's own.
module flag_standby
  import xenon_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  opcode_e    op,
  input  cond_e      cond,
  input  logic [7:0] a,
  input  logic       ar_upd, ar_z, ar_n, ar_v,
  input  logic       mo_upd, mo_z,
  input  logic       c_eq, c_lt, c_gt,
  input  logic       srdy,
  output flags_t     flags,
  output logic       cond_val,
  output logic       exec_en,
  output logic       gor_bit,
  output logic       standby
);
  logic active, ctrl_op;

  always_comb begin
    unique case (cond)
      C_AL: cond_val = 1'b1;
      C_Z:  cond_val = flags.z;
      C_NZ: cond_val = ~flags.z;
      C_N:  cond_val = flags.n;
      C_LT: cond_val = flags.lt;
      C_GT: cond_val = flags.gt;
      C_EQ: cond_val = flags.eq;
      C_F:  cond_val = flags.f;
      default: cond_val = 1'b1;
    endcase
  end

  assign active  = valid & ~standby;
  assign ctrl_op = op inside {OP_STBY, OP_SETF, OP_WAKE, OP_GOR};
  assign exec_en = active & cond_val & ~ctrl_op;
  assign gor_bit = (cond == C_AL) ? ~standby : cond_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags   <= '0;
      standby <= 1'b0;
    end else begin
      if (exec_en && op == OP_CLRF) flags <= '0;
      if (exec_en && ar_upd) begin
        flags.z <= ar_z; flags.n <= ar_n; flags.v <= ar_v;
      end
      if (exec_en && mo_upd) flags.z <= mo_z;
      if (exec_en && op == OP_CMP) begin
        flags.eq <= c_eq; flags.lt <= c_lt; flags.gt <= c_gt;
      end
      if (active && op == OP_SETF) flags.f <= cond_val;
      if (exec_en && op == OP_SRDY) flags.f <= srdy;
      if (active && op == OP_STBY && cond_val) standby <= 1'b1;
      if (valid && standby && op == OP_WAKE && a != 8'd0) standby <= 1'b0;
    end
  end
endmodule
