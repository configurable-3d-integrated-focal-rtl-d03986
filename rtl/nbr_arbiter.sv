// Neighbourhood arbiter and boundary modules of the processor array.
// Neighbouring memories are mapped into each processor's view: because all
// processors execute the same access, every memory is read at the same
// address, and the arbiter only chooses whose data each processor receives.
// In byte mode processor (x,y) gets the byte read by processor (x+sx, y+sy),
// sx,sy in {-1,0,1}; with 8x8-pixel tiles and offsets of up to +-7 pixels
// this covers a 15x15 kernel. In bit mode (binary images, one byte per tile
// row, bit j = column j) it concatenates the row bytes of the left, own and
// right processor of row y+sy and extracts the eight bits starting at pixel
// offset dx, i.e. it aligns the access to 1-bit resolution. Outside the array
// the boundary modules substitute the boundary byte, or the boundary bit
// replicated, loaded by SETB. Data routing is combinational on the memory
// read data; the boundary registers load at the clock edge.
// Routing through the arbiter, 1-bit alignment and boundary substitution
// follow the architecture; constant-value boundaries are this design's choice.
module nbr_arbiter #(
  parameter int unsigned NX = 8,
  parameter int unsigned NY = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   setb,
  input  logic [8:0]             setb_val,
  input  logic [NY-1:0][NX-1:0][7:0] rdata,
  input  logic signed [1:0]      sx,
  input  logic signed [1:0]      sy,
  input  logic signed [3:0]      dx,
  input  logic                   bmode,
  output logic [NY-1:0][NX-1:0][7:0] opnd
);
  logic [7:0] bbyte;
  logic       bbit;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bbyte <= '0;
      bbit  <= 1'b0;
    end else if (setb) begin
      bbyte <= setb_val[7:0];
      bbit  <= setb_val[8];
    end

  // Byte of processor (x,y), or the boundary value outside the array.
  function automatic logic [7:0] pick(input logic [NY-1:0][NX-1:0][7:0] d,
                                      input int x, input int y, input logic [7:0] bv);
    if (x < 0 || y < 0 || x >= int'(NX) || y >= int'(NY)) return bv;
    return d[y][x];
  endfunction

  always_comb begin
    for (int y = 0; y < int'(NY); y++) begin
      for (int x = 0; x < int'(NX); x++) begin
        logic [23:0] row;
        int          ty;
        ty = y + int'(sy);
        if (!bmode) begin
          opnd[y][x] = pick(rdata, x + int'(sx), ty, bbyte);
          row = '0;
        end else begin
          row = {pick(rdata, x + 1, ty, {8{bbit}}),
                 pick(rdata, x,     ty, {8{bbit}}),
                 pick(rdata, x - 1, ty, {8{bbit}})};
          for (int j = 0; j < 8; j++)
            opnd[y][x][j] = row[8 + j + int'(dx)];
        end
      end
    end
  end
endmodule
