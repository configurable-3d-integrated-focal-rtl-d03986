// Arithmetic unit of one processor: 8-bit multiply-add datapath with a
// 24-bit accumulator.
// Operand A (8 bit) is extended to 9 bits as signed or unsigned (sga); operand B
// arrives already as a signed 9-bit value, so the multiplier is a signed 9x9
// multiplier and signed, unsigned and mixed products all use it. The
// accumulator supports load, add, subtract, multiply, multiply-add and a
// barrel shift left/right with sign extension. LDAH/ADDH load or add A as the
// high byte, so 16-bit operands stored as two bytes can be loaded and summed
// (LDA/ADD the unsigned low byte, then LDAH/ADDH the high byte). SAT8/SAT16 clip the
// accumulator to the 8- or 16-bit signed (sga=1) or unsigned (sga=0) range;
// BFX extracts a bit field of A. Those three give a result byte on `res`.
// Timing: `res` and `fl` are combinational from the current inputs and
// accumulator; the accumulator updates at the clock edge when `en` is high.
// The 9x9 multiplier, 24-bit accumulator, sign-extending shifter and
// saturation follow the architecture; opcode set, shift amount from imm[4:0],
// SAT16 byte select imm[0] and BFX field layout (imm[2:0] position,
// imm[5:3]+1 length) are this design's own choices.
module arith_unit
  import xenon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  opcode_e           op,
  input  logic [7:0]        a,
  input  logic signed [8:0] b9,
  input  logic              sga,
  input  logic [8:0]        imm,
  output logic signed [ACC_W-1:0] acc,
  output logic [7:0]        res,
  output logic              fl_upd,   // this op changes Z/N/V
  output logic              fl_z,
  output logic              fl_n,
  output logic              fl_v
);
  logic signed [8:0]       a9;
  logic signed [17:0]      prod;
  logic signed [ACC_W-1:0] a_ext, acc_nx;
  logic signed [ACC_W-1:0] s8, s16;
  logic                    v8, v16;
  logic [7:0]              bfmask;

  assign a9    = {sga & a[7], a};
  assign prod  = a9 * b9;
  assign a_ext = ACC_W'(a9);

  always_comb begin
    unique case (op)
      OP_CLRACC: acc_nx = '0;
      OP_LDA:    acc_nx = a_ext;
      OP_ADD:    acc_nx = acc + a_ext;
      OP_SUB:    acc_nx = acc - a_ext;
      OP_MUL:    acc_nx = ACC_W'(prod);
      OP_MACC:   acc_nx = acc + ACC_W'(prod);
      OP_SHL:    acc_nx = acc <<< imm[4:0];
      OP_SHR:    acc_nx = acc >>> imm[4:0];
      OP_LDAH:   acc_nx = (a_ext <<< 8) | ACC_W'(acc[7:0]);
      OP_ADDH:   acc_nx = acc + (a_ext <<< 8);
      default:   acc_nx = acc;
    endcase
  end

  // Saturation to 8 and 16 bits.
  always_comb begin
    if (sga) begin
      v8  = (acc > 127) || (acc < -128);
      s8  = (acc > 127) ? 127 : (acc < -128) ? -128 : acc;
      v16 = (acc > 32767) || (acc < -32768);
      s16 = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : acc;
    end else begin
      v8  = (acc > 255) || (acc < 0);
      s8  = (acc > 255) ? 255 : (acc < 0) ? 0 : acc;
      v16 = (acc > 65535) || (acc < 0);
      s16 = (acc > 65535) ? 65535 : (acc < 0) ? 0 : acc;
    end
  end

  always_comb begin
    bfmask = 8'((9'd1 << (imm[5:3] + 4'd1)) - 9'd1);
    unique case (op)
      OP_SAT8:  res = s8[7:0];
      OP_SAT16: res = imm[0] ? s16[15:8] : s16[7:0];
      OP_BFX:   res = (a >> imm[2:0]) & bfmask;
      default:  res = acc[7:0];
    endcase
  end

  always_comb begin
    fl_upd = op inside {OP_CLRACC, OP_LDA, OP_ADD, OP_SUB, OP_MUL, OP_MACC, OP_SHL,
                        OP_SHR, OP_SAT8, OP_SAT16, OP_LDAH, OP_ADDH};
    fl_z = (acc_nx == 0);
    fl_n = acc_nx[ACC_W-1];
    fl_v = 1'b0;
    if (op == OP_SAT8)  begin fl_z = (s8 == 0);  fl_n = s8[ACC_W-1];  fl_v = v8;  end
    if (op == OP_SAT16) begin fl_z = (s16 == 0); fl_n = s16[ACC_W-1]; fl_v = v16; end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_nx;
endmodule
