// Comparator unit: evaluates the relation between operand A and operand B.
// A (8 bit) is taken as signed or unsigned by `sga`; B arrives as a signed
// 9-bit value (an immediate or a register extended by the crossbar), so signed,
// unsigned and mixed comparisons all reduce to one signed 9-bit comparison.
// Purely combinational; the flags are stored by flag_standby when a CMP
// instruction executes. EQ/LT/GT as the flag set is this design's choice.
module cmp_unit (
  input  logic [7:0]        a,
  input  logic              sga,
  input  logic signed [8:0] b9,
  output logic              eq,
  output logic              lt,
  output logic              gt
);
  logic signed [8:0] a9;
  assign a9 = {sga & a[7], a};
  assign eq = (a9 == b9);
  assign lt = (a9 <  b9);
  assign gt = (a9 >  b9);
endmodule
