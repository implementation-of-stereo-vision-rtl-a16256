// read_access_gen: read addresses for every memory of an NY x NX memory
// matrix, for a two-dimensional window access.
//
// A 2-D request (xi, yi) (integer parts) is split per dimension into low
// bits (which memory column/row the request falls in) and high bits (the
// block address). Each memory (r, c) must be read at
//   A[r][c] = base + oy[r] * C2 + ox[c],   base = (yi / NY) * C2 + xi / NX
// where ox, oy come from one offset_vector per dimension and C2 = W / NX is
// the address distance between two block rows. The nine possible constants
// {-1,0,1} x C2 + {-1,0,1} only change with the frame size and are formed
// once from c2; eight adders add the non-zero ones to base so that all
// candidate addresses exist, and each memory then selects its candidate by
// its (oy, ox) pair. Addresses wrap modulo 2^AW (the memories form a ring).
//
// Timing: stage 1 registers base and the offsets, stage 2 registers the
// candidates; the routed addresses are valid in the cycle after stage 2
// (latency 2, advancing on ce). The low bits are delayed alongside for the
// data rearrangement. c2 is an external constant (e.g. a configuration
// register) so the frame size can change without a divider.
module read_access_gen #(
  parameter int NX = 4,
  parameter int NY = 4,
  parameter int AW = 13,
  parameter int XW = 12,     // width of the non-negative integer request
  parameter int YW = 12
) (
  input  logic              clk,
  input  logic              ce,
  input  logic [AW-1:0]     c2,
  input  logic [XW-1:0]     xi,
  input  logic [YW-1:0]     yi,
  output logic [AW-1:0]     addr [NY][NX],
  output logic [$clog2(NX)-1:0] xl_out,
  output logic [$clog2(NY)-1:0] yl_out
);
  localparam int LX = $clog2(NX);
  localparam int LY = $clog2(NY);

  logic signed [1:0] ox_n [NX];
  logic signed [1:0] oy_n [NY];
  offset_vector #(.N(NX)) u_ovx (.rl(xi[LX-1:0]), .offs(ox_n));
  offset_vector #(.N(NY)) u_ovy (.rl(yi[LY-1:0]), .offs(oy_n));

  // offset constants, index [oy+1][ox+1]
  logic [AW-1:0] konst [3][3];
  always_comb begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        konst[a][b] = AW'((a - 1)) * c2 + AW'(b - 1);
  end

  logic [AW-1:0]     base1;
  logic signed [1:0] ox1 [NX], oy1 [NY];
  logic [LX-1:0]     xl1, xl2;
  logic [LY-1:0]     yl1, yl2;
  logic [AW-1:0]     cand [3][3];
  logic signed [1:0] ox2 [NX], oy2 [NY];

  always_ff @(posedge clk) begin
    if (ce) begin
      base1 <= AW'(AW'(yi >> LY) * c2) + AW'(xi >> LX);
      ox1   <= ox_n;
      oy1   <= oy_n;
      xl1   <= xi[LX-1:0];
      yl1   <= yi[LY-1:0];
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++)
          cand[a][b] <= base1 + konst[a][b];
      ox2 <= ox1;
      oy2 <= oy1;
      xl2 <= xl1;
      yl2 <= yl1;
    end
  end

  always_comb begin
    for (int r = 0; r < NY; r++)
      for (int c = 0; c < NX; c++)
        addr[r][c] = cand[int'(oy2[r]) + 1][int'(ox2[c]) + 1];
  end
  assign xl_out = xl2;
  assign yl_out = yl2;
endmodule
