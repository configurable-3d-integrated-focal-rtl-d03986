// Single-bit morphology processor: a one-bit register combined with one input
// pixel bit by the selected logic function (load, AND, OR, AND-NOT, OR-NOT,
// XOR). Erosion is a chain of ANDs over the structuring element, dilation a
// chain of ORs, hit-and-miss mixes AND and AND-NOT. Updates at the clock edge
// when `en` is high. The function set is this design's choice.
module morph_cell
  import xenon_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  opcode_e op,
  input  logic    w,
  output logic    q
);
  logic d;
  always_comb begin
    unique case (op)
      OP_MLD:   d = w;
      OP_MAND:  d = q & w;
      OP_MOR:   d = q | w;
      OP_MANDN: d = q & ~w;
      OP_MORN:  d = q | ~w;
      OP_MXOR:  d = q ^ w;
      default:  d = q;
    endcase
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= d;
endmodule
