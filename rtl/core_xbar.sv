// Crossbar switch of the processor core. Selects operand A for the arithmetic,
// comparator and data-transfer paths among the arbiter (own or neighbour
// memory), the selected register, the immediate, the sensor buffer, the
// morphology register and the low accumulator byte; selects operand B between
// the signed 9-bit immediate and register 0 extended by `sgb`. Combinational.
// The crossbar-centred core follows the architecture; the source list is this
// design's choice.
module core_xbar
  import xenon_pkg::*;
(
  input  srca_e             srca,
  input  srcb_e             srcb,
  input  logic              sgb,
  input  logic [7:0]        mem,
  input  logic [7:0]        reg_rd,
  input  logic [7:0]        reg0,
  input  logic [8:0]        imm,
  input  logic [7:0]        sens,
  input  logic [7:0]        morph,
  input  logic [7:0]        accl,
  output logic [7:0]        a,
  output logic signed [8:0] b9
);
  always_comb begin
    unique case (srca)
      SA_MEM:   a = mem;
      SA_REG:   a = reg_rd;
      SA_IMM:   a = imm[7:0];
      SA_SENS:  a = sens;
      SA_MORPH: a = morph;
      SA_ACCL:  a = accl;
      default:  a = mem;
    endcase
    b9 = (srcb == SB_IMM) ? $signed(imm) : $signed({sgb & reg0[7], reg0});
  end
endmodule
