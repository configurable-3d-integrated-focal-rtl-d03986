// Shared types and constants of the SIMD sensor-processor array.
// The array is a multi-SIMD machine: one decoder broadcasts a microinstruction
// to every processor of the array each core clock. The instruction word below
// (46 bits, carried as two 32-bit bus words) is this design's own encoding; the
// operation set follows the groups of the architecture: initialisation, data
// transfer, arithmetic, logic (binary morphology) and comparison.
package xenon_pkg;

  localparam int unsigned DW     = 8;    // pixel / data byte
  localparam int unsigned ACC_W  = 24;   // accumulator width
  localparam int unsigned MEM_AW = 9;    // 512-byte processor memory
  localparam int unsigned NREGS  = 4;    // register bank size

  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    // initialisation
    OP_CLRACC = 6'd1,   // acc <= 0
    OP_CLRF   = 6'd2,   // all flags <= 0
    OP_SETB   = 6'd3,   // boundary byte <= imm[7:0], boundary bit <= imm[8]
    OP_SETIDX = 6'd4,   // pixel index <= imm (decoder)
    OP_INCIDX = 6'd5,   // pixel index <= index + 1 (decoder)
    OP_SSTART = 6'd6,   // start a sensor conversion of the own tile; imm = integration clocks (0: default)
    // data transfer
    OP_MOV    = 6'd8,   // dst <= A
    // arithmetic
    OP_LDA    = 6'd16,  // acc <= ext(A)
    OP_ADD    = 6'd17,  // acc <= acc + ext(A)
    OP_SUB    = 6'd18,  // acc <= acc - ext(A)
    OP_MUL    = 6'd19,  // acc <= A * B
    OP_MACC   = 6'd20,  // acc <= acc + A * B
    OP_SHL    = 6'd21,  // acc <= acc << imm[4:0]
    OP_SHR    = 6'd22,  // acc <= acc >>> imm[4:0] (sign extending)
    OP_SAT8   = 6'd23,  // dst <= sat8(acc)
    OP_SAT16  = 6'd24,  // dst <= byte imm[0] of sat16(acc)
    OP_BFX    = 6'd25,  // dst <= bit field of A
    OP_LDAH   = 6'd26,  // acc <= ext(A) << 8 | acc[7:0]  (16-bit operand, high byte)
    OP_ADDH   = 6'd27,  // acc <= acc + (ext(A) << 8)    (16-bit add, high byte)
    // logic / binary morphology (operand is the bit-aligned word)
    OP_MLD    = 6'd32,
    OP_MAND   = 6'd33,
    OP_MOR    = 6'd34,
    OP_MANDN  = 6'd35,
    OP_MORN   = 6'd36,
    OP_MXOR   = 6'd37,
    // comparison and control
    OP_CMP    = 6'd40,  // flags EQ/LT/GT <= relation(A, B)
    OP_SETF   = 6'd41,  // F <= condition
    OP_STBY   = 6'd42,  // enter standby if condition
    OP_WAKE   = 6'd43,  // leave standby if A != 0 (executed in standby too)
    OP_GOR    = 6'd44,  // array-wide OR of the condition (decoder latches)
    OP_SRDY   = 6'd45   // F <= own sensor tile has a new frame
  } opcode_e;

  typedef enum logic [2:0] {
    C_AL = 3'd0, C_Z = 3'd1, C_NZ = 3'd2, C_N = 3'd3,
    C_LT = 3'd4, C_GT = 3'd5, C_EQ = 3'd6, C_F = 3'd7
  } cond_e;

  typedef enum logic [2:0] {
    SA_MEM = 3'd0, SA_REG = 3'd1, SA_IMM = 3'd2, SA_SENS = 3'd3,
    SA_MORPH = 3'd4, SA_ACCL = 3'd5
  } srca_e;

  typedef enum logic {SB_IMM = 1'b0, SB_REG0 = 1'b1} srcb_e;

  typedef enum logic {D_REG = 1'b0, D_MEM = 1'b1} dst_e;

  typedef struct packed {
    opcode_e            op;
    cond_e              cond;
    srca_e              srca;
    srcb_e              srcb;
    dst_e               dst;
    logic [1:0]         rsel;
    logic               sga;      // A is signed
    logic               sgb;      // register B is signed
    logic               bmode;    // 1-bit aligned (binary image) access
    logic               use_idx;  // address relative to the pixel index
    logic signed [3:0]  dx;
    logic signed [3:0]  dy;
    logic [MEM_AW-1:0]  addr;
    logic [8:0]         imm;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Microinstruction in the execute stage, shared by all processors.
  typedef struct packed {
    logic               valid;
    instr_t             ins;
    logic [MEM_AW-1:0]  waddr;    // own-memory write address
    logic signed [1:0]  sx;       // source processor offset (byte mode)
    logic signed [1:0]  sy;
  } uop_t;

  typedef struct packed {
    logic z, n, v, eq, lt, gt, f;
  } flags_t;

  // Operations whose result byte is written to the destination.
  function automatic logic writes_dst(opcode_e op);
    return op inside {OP_MOV, OP_SAT8, OP_SAT16, OP_BFX};
  endfunction

  // Operations that read operand A from memory in the issue stage.
  function automatic logic reads_mem(instr_t i);
    return (i.srca == SA_MEM && i.op inside {OP_MOV, OP_LDA, OP_ADD, OP_SUB, OP_MUL,
              OP_MACC, OP_BFX, OP_CMP, OP_WAKE, OP_LDAH, OP_ADDH})
           || (i.op inside {OP_MLD, OP_MAND, OP_MOR, OP_MANDN, OP_MORN, OP_MXOR});
  endfunction

  // Operations handled by the decoder alone.
  function automatic logic decoder_only(opcode_e op);
    return op inside {OP_NOP, OP_SETIDX, OP_INCIDX};
  endfunction

endpackage
