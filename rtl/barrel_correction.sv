// barrel_correction: second-order radial lens-distortion correction.
//
// For an output coordinate (Xo, Yo) it computes the input coordinate that
// the distorted camera image holds it at:
//   dx = Xo - Xc,  dy = Yo - Yc
//   r  = (dx / ax)^2 + (dy / ay)^2
//   Xi = dx (1 + K1 r + K2 r^2) + Xc,   Yi = dy (1 + K1 r + K2 r^2) + Yc
// The pipeline is cut exactly as in the original circuit diagram: subtract,
// scale by 1/a, square, add (r), {r, r^2}, {K1 r, K2 r^2}, sum with 1,
// multiply by the delayed dx/dy, add the centre: 9 register stages, with dx
// and dy carried through a 6-register delay line.
//
// Formats (this design's choice): coordinates stereo_pkg::coord_t; 1/ax and
// 1/ay unsigned with 20 fraction bits; dx/a kept with 16 fraction bits and
// limited to |dx/a| < 8; K1, K2 signed with 16 fraction bits (K_W bits).
// Results are saturated to the coordinate range.
// Interface: valid/ready stream in and out, one coordinate per cycle,
// latency 9 cycles, the whole pipeline stalls on out_ready low.
module barrel_correction
  import stereo_pkg::*;
#(
  parameter int K_W = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  input  coord_t      x_center,
  input  coord_t      y_center,
  input  logic [19:0] inv_alpha_x,     // 1/ax, 20 fraction bits
  input  logic [19:0] inv_alpha_y,     // 1/ay, 20 fraction bits
  input  logic signed [K_W-1:0] k1,    // 16 fraction bits
  input  logic signed [K_W-1:0] k2,    // 16 fraction bits
  input  coord_pair_t in_c,
  input  logic        in_valid,
  output logic        in_ready,
  output coord_pair_t out_c,
  output logic        out_valid,
  input  logic        out_ready
);
  localparam int LAT = 9;
  localparam int UW  = 20;   // dx/a: signed, 16 fraction bits
  localparam int SQW = 24;   // (dx/a)^2: unsigned, 16 fraction bits
  localparam int RW  = 25;   // r
  localparam int R2W = 34;   // r^2, 16 fraction bits
  localparam int TW  = 44;   // K r terms and the scale factor, 16 fraction bits

  logic ce;
  logic [LAT-1:0] vld;
  assign ce        = !vld[LAT-1] || out_ready;
  assign in_ready  = ce;
  assign out_valid = vld[LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[LAT-2:0], in_valid};
  end

  logic signed [COORD_W:0]   dx1, dy1;            // stage 1
  logic signed [COORD_W:0]   dx_d [6], dy_d [6];  // stages 2..7
  logic signed [UW-1:0]      ux2, uy2;            // stage 2
  logic        [SQW-1:0]     sx3, sy3;            // stage 3
  logic        [RW-1:0]      r4;                  // stage 4
  logic        [RW-1:0]      r5;                  // stage 5
  logic        [R2W-1:0]     rr5;
  logic signed [TW-1:0]      t1_6, t2_6;          // stage 6
  logic signed [TW-1:0]      s7;                  // stage 7
  logic signed [TW+COORD_W:0] px8, py8;           // stage 8

  function automatic coord_t sat(input logic signed [TW+COORD_W+1:0] v);
    if (v > (TW+COORD_W+2)'(2**(COORD_W-1) - 1)) return {1'b0, {(COORD_W-1){1'b1}}};
    if (v < -(TW+COORD_W+2)'(2**(COORD_W-1)))    return {1'b1, {(COORD_W-1){1'b0}}};
    return v[COORD_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (ce) begin
      logic signed [COORD_W+21:0] mx, my;
      logic signed [2*UW-1:0] qx, qy;
      logic [RW+R2W-1:0] q2;
      // 1: subtract the centre
      dx1 <= (COORD_W+1)'(in_c.x) - (COORD_W+1)'(x_center);
      dy1 <= (COORD_W+1)'(in_c.y) - (COORD_W+1)'(y_center);
      // 2: scale by 1/alpha (4 + 20 fraction bits -> keep 16)
      mx  = (COORD_W+22)'(dx1) * $signed({1'b0, inv_alpha_x});
      my  = (COORD_W+22)'(dy1) * $signed({1'b0, inv_alpha_y});
      ux2 <= UW'(mx >>> 8);
      uy2 <= UW'(my >>> 8);
      // 3: square (32 -> 16 fraction bits)
      qx  = (2*UW)'(ux2) * (2*UW)'(ux2);
      qy  = (2*UW)'(uy2) * (2*UW)'(uy2);
      sx3 <= SQW'(qx >>> 16);
      sy3 <= SQW'(qy >>> 16);
      // 4: r
      r4  <= RW'(sx3) + RW'(sy3);
      // 5: r and r^2
      r5  <= r4;
      q2  = (RW+R2W)'(r4) * (RW+R2W)'(r4);
      rr5 <= R2W'(q2 >> 16);
      // 6: K1 r, K2 r^2
      t1_6 <= TW'((TW'(k1) * $signed({1'b0, TW'(r5)})) >>> 16);
      t2_6 <= TW'((TW'(k2) * $signed({1'b0, TW'(rr5)})) >>> 16);
      // 7: 1 + K1 r + K2 r^2
      s7  <= (TW'(1) <<< 16) + t1_6 + t2_6;
      // 8: scale the delayed offsets (4 + 16 fraction bits)
      px8 <= (TW+COORD_W+1)'(dx_d[5]) * (TW+COORD_W+1)'(s7);
      py8 <= (TW+COORD_W+1)'(dy_d[5]) * (TW+COORD_W+1)'(s7);
      // 9: add the centre back
      out_c.x <= sat((TW+COORD_W+2)'(px8 >>> 16) + (TW+COORD_W+2)'(x_center));
      out_c.y <= sat((TW+COORD_W+2)'(py8 >>> 16) + (TW+COORD_W+2)'(y_center));
      // delay line for dx, dy
      dx_d[0] <= dx1; dy_d[0] <= dy1;
      for (int i = 1; i < 6; i++) begin
        dx_d[i] <= dx_d[i-1]; dy_d[i] <= dy_d[i-1];
      end
    end
  end
endmodule
