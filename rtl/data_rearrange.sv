// data_rearrange: reorders memory-matrix read data into window order.
//
// Memory (r, c) of the NY x NX matrix returns the window sample whose row
// is congruent to r and column congruent to c. The window starts at row
// yi - NY/2 + 1 and column xi - NX/2 + 1, so window element (j, k) comes from
// memory ((yl - NY/2 + 1 + j) mod NY, (xl - NX/2 + 1 + k) mod NX), where
// xl, yl are the low request bits. Per dimension this is a rotation selected
// by the low bits, the inverse of the offset-vector slicing; for N = 4 and
// xl = 0 the order is M3, M0, M1, M2. Combinational.
module data_rearrange #(
  parameter int NX    = 4,
  parameter int NY    = 4,
  parameter int PIX_W = 8
) (
  input  logic [PIX_W-1:0]       mem_data [NY][NX],
  input  logic [$clog2(NX)-1:0]  xl,
  input  logic [$clog2(NY)-1:0]  yl,
  output logic [PIX_W-1:0]       win [NY][NX]
);
  localparam int LX = $clog2(NX);
  localparam int LY = $clog2(NY);
  always_comb begin
    for (int j = 0; j < NY; j++)
      for (int k = 0; k < NX; k++)
        win[j][k] = mem_data[LY'(int'(yl) - NY/2 + 1 + j)][LX'(int'(xl) - NX/2 + 1 + k)];
  end
endmodule
