// Binary morphology unit: NBITS identical single-bit morphology processors
// working side by side on one bit-aligned row word (eight pixels of a binary
// image, one bit per pixel). The arbiter supplies the word already shifted to
// 1-bit resolution, so one instruction applies one structuring-element tap to
// eight pixels at once. `q` is the morphology register; `z` tells whether the
// next value is all zero (used for the Z flag). Eight cells follow the
// architecture; their logic function set is this design's choice.
module morph_unit
  import xenon_pkg::*;
#(
  parameter int unsigned NBITS = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  opcode_e          op,
  input  logic [NBITS-1:0] w,
  output logic [NBITS-1:0] q,
  output logic             is_morph,
  output logic             z
);
  logic [NBITS-1:0] qn;
  assign is_morph = op inside {OP_MLD, OP_MAND, OP_MOR, OP_MANDN, OP_MORN, OP_MXOR};

  for (genvar i = 0; i < NBITS; i++) begin : g_cell
    morph_cell u_cell (.clk, .rst_n, .en(en & is_morph), .op, .w(w[i]), .q(q[i]));
  end

  // Next value, for the zero flag of this instruction.
  always_comb begin
    unique case (op)
      OP_MLD:   qn = w;
      OP_MAND:  qn = q & w;
      OP_MOR:   qn = q | w;
      OP_MANDN: qn = q & ~w;
      OP_MORN:  qn = q | ~w;
      OP_MXOR:  qn = q ^ w;
      default:  qn = q;
    endcase
  end
  assign z = (qn == '0);
endmodule
