// Instruction decoder of one SIMD processor array, with the array-wide OR.
// It takes instructions from the program buffer (show-ahead FIFO) and runs a
// two-stage pipeline shared by all processors of the array:
//   issue   - computes the memory read address from the instruction base
//             address, the pixel index and the neighbour offset (dx,dy in
//             -7..7), and the source processor offset (sx,sy) for the
//             arbiter; all memories are read at that address;
//   execute - the microinstruction `uop` is broadcast to every processor,
//             which finds its operand in the arbiter output and may write its
//             own memory at `uop.waddr`.
// Each processor holds an 8x8 pixel tile; the pixel index `idx` (row*8+col)
// lives here and is changed by SETIDX/INCIDX, which never leave the decoder.
// In bit mode (binary images) the address selects a tile row only.
// Memory port A is used by one access per cycle: when the execute stage
// writes memory and the issued instruction reads it, issue stalls one cycle
// (`stall`). GOR latches the OR of all processors' `gor_bits` into `gor`.
// Timing: one instruction per clock without stalls; a memory result is
// readable by the second instruction after the one that wrote it.
// The shared decoder, neighbour offsets and global OR follow the
// architecture; the pipeline, the stall rule and the index register are this
// design's choices.
module instr_decoder
  import xenon_pkg::*;
#(
  parameter int unsigned TILE = 8,
  parameter int unsigned NPE  = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  instr_t               ins,
  input  logic                 empty,
  output logic                 pop,
  output logic [MEM_AW-1:0]    mem_addr,
  output logic [$clog2(TILE*TILE)-1:0] idx,
  output uop_t                 uop,
  output logic                 stall,
  output logic                 busy,
  input  logic [NPE-1:0]       gor_bits,
  output logic                 gor,
  output logic                 gor_valid
);
  localparam int unsigned LW = $clog2(TILE);

  logic [LW-1:0]     lx, ly, tx, ty;
  logic signed [1:0] sx, sy;
  logic [MEM_AW-1:0] raddr, waddr;
  logic              e_writes, have;
  int                px, py;

  assign lx = ins.use_idx ? idx[LW-1:0]    : '0;
  assign ly = ins.use_idx ? idx[2*LW-1:LW] : '0;

  // Address generation for the issued instruction.
  always_comb begin
    px = int'(lx) + int'(ins.dx);
    py = int'(ly) + int'(ins.dy);
    sx = (px < 0) ? -2'sd1 : (px >= int'(TILE)) ? 2'sd1 : 2'sd0;
    sy = (py < 0) ? -2'sd1 : (py >= int'(TILE)) ? 2'sd1 : 2'sd0;
    tx = LW'(px);
    ty = LW'(py);
    if (ins.bmode) begin
      sx    = 2'sd0;
      raddr = ins.addr + MEM_AW'(ty);
      waddr = ins.addr + MEM_AW'(ly);
    end else begin
      raddr = ins.addr + MEM_AW'({ty, tx});
      waddr = ins.addr + MEM_AW'({ly, lx});
    end
  end

  assign have     = ~empty;
  assign e_writes = uop.valid && writes_dst(uop.ins.op) && uop.ins.dst == D_MEM;
  assign stall    = have && e_writes && reads_mem(ins);
  assign pop      = have && !stall;
  assign mem_addr = e_writes ? uop.waddr : raddr;
  assign busy     = have || uop.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uop       <= '0;
      idx       <= '0;
      gor       <= 1'b0;
      gor_valid <= 1'b0;
    end else begin
      uop.valid <= 1'b0;
      if (pop) begin
        if (ins.op == OP_SETIDX) idx <= ins.imm[$clog2(TILE*TILE)-1:0];
        if (ins.op == OP_INCIDX) idx <= idx + 1'b1;
        if (!decoder_only(ins.op)) begin
          uop.valid <= 1'b1;
          uop.ins   <= ins;
          uop.waddr <= waddr;
          uop.sx    <= sx;
          uop.sy    <= sy;
        end
      end
      gor_valid <= 1'b0;
      if (uop.valid && uop.ins.op == OP_GOR) begin
        gor       <= |gor_bits;
        gor_valid <= 1'b1;
      end
    end
  end
endmodule
