// homography: inverse projective mapping used for image rectification.
//
// For each output-image coordinate (x, y) the block computes the input-image
// coordinate  x' = (h0 x + h1 y + h2) / w,  y' = (h3 x + h4 y + h5) / w,
// w = h6 x + h7 y + h8,  i.e. a 3x3 matrix product in homogeneous coordinates
// followed by the conversion back to cartesian coordinates. The division uses
// a Goldschmidt reciprocal of w (goldschmidt_div, normalising front end
// included) and two multipliers. A point with w <= 0 has no image and is sent
// out at the most negative coordinate, which downstream blocks treat as
// outside the frame. Results are saturated to the coordinate format.
//
// Formats: coordinates are stereo_pkg::coord_t (signed, 4 fraction bits);
// matrix entries are signed H_W-bit numbers with H_FRAC fraction bits,
// supplied from configuration registers. w is limited to (0, 256). The final
// scaling rounds to the nearest 1/16 pixel, so an identity or integer
// translation matrix maps integer positions exactly.
// Interface: valid/ready stream in and out; one coordinate per cycle;
// latency 2 + (ITER + 2) + 1 cycles; the pipeline stalls as a whole on
// out_ready low.
// The matrix-multiply-then-Goldschmidt structure follows the original
// rectification circuit; number formats and pipeline cut points are this
// design's choices.
module homography
  import stereo_pkg::*;
#(
  parameter int H_W    = 32,
  parameter int H_FRAC = 20,
  parameter int ITER   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic signed [H_W-1:0] h [9],
  input  coord_pair_t in_c,
  input  logic        in_valid,
  output logic        in_ready,
  output coord_pair_t out_c,
  output logic        out_valid,
  input  logic        out_ready
);
  localparam int PF  = H_FRAC + COORD_FRAC;          // product fraction bits
  localparam int SW  = COORD_W + H_W + 2;             // sum width
  localparam int LAT = ITER + 2;                      // divider latency
  localparam int RF  = 24;                            // reciprocal fraction bits

  logic ce;
  logic vld1, vld2, vldo;
  assign ce        = !vldo || out_ready;
  assign in_ready  = ce;
  assign out_valid = vldo;

  // s1: products
  logic signed [SW-1:0] p [9];
  // s2: sums
  logic signed [SW-1:0] xh, yh, wh;

  always_ff @(posedge clk) begin
    if (ce) begin
      for (int r = 0; r < 3; r++) begin
        p[3*r]   <= SW'(h[3*r])   * SW'(in_c.x);
        p[3*r+1] <= SW'(h[3*r+1]) * SW'(in_c.y);
        p[3*r+2] <= SW'(h[3*r+2]) <<< COORD_FRAC;
      end
      xh <= p[0] + p[1] + p[2];
      yh <= p[3] + p[4] + p[5];
      wh <= p[6] + p[7] + p[8];
    end
  end

  // w to unsigned Q8.24 for the divider
  logic [31:0] w_u;
  logic        w_bad;
  always_comb begin
    logic signed [SW-1:0] w24;
    w24   = wh >>> (PF - 24);
    w_bad = (wh <= 0) || (w24 >= (SW'(1) <<< 32));
    w_u   = w_bad ? 32'd1 : w24[31:0];
  end

  logic [31:0] recip;
  logic        rzero, rvalid;
  goldschmidt_div #(.D_W(32), .D_FRAC(24), .R_W(32), .R_FRAC(RF), .ITER(ITER)) u_div (
    .clk, .rst_n, .ce, .in_d(w_u), .in_valid(vld2),
    .out_recip(recip), .out_zero(rzero), .out_valid(rvalid)
  );

  // numerators and flags travel alongside the divider
  logic signed [SW-1:0] xh_d [LAT], yh_d [LAT];
  logic                 bad_d [LAT];
  always_ff @(posedge clk) begin
    if (ce) begin
      xh_d[0] <= xh; yh_d[0] <= yh; bad_d[0] <= w_bad;
      for (int i = 1; i < LAT; i++) begin
        xh_d[i] <= xh_d[i-1]; yh_d[i] <= yh_d[i-1]; bad_d[i] <= bad_d[i-1];
      end
    end
  end

  function automatic coord_t scale_sat(input logic signed [SW-1:0] num,
                                       input logic [31:0] rcp);
    logic signed [SW+33-1:0] prod;
    logic signed [SW+33-1:0] q;
    prod = (SW+33)'(num) * $signed({1'b0, rcp});
    // round to nearest: the reciprocal is a little below 1/w, and plain
    // truncation would move exact integer positions one step down
    q    = (prod + ((SW+33)'(1) <<< (PF + RF - COORD_FRAC - 1))) >>> (PF + RF - COORD_FRAC);
    if (q > (SW+33)'(coord_t'({1'b0, {(COORD_W-1){1'b1}}})))
      return {1'b0, {(COORD_W-1){1'b1}}};
    else if (q < -(SW+33)'(2**(COORD_W-1)))
      return {1'b1, {(COORD_W-1){1'b0}}};
    else
      return q[COORD_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld1 <= 1'b0; vld2 <= 1'b0; vldo <= 1'b0;
    end else if (ce) begin
      vld1 <= in_valid;
      vld2 <= vld1;
      vldo <= rvalid;
    end
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      if (bad_d[LAT-1] || rzero) begin
        out_c.x <= {1'b1, {(COORD_W-1){1'b0}}};
        out_c.y <= {1'b1, {(COORD_W-1){1'b0}}};
      end else begin
        out_c.x <= scale_sat(xh_d[LAT-1], recip);
        out_c.y <= scale_sat(yh_d[LAT-1], recip);
      end
    end
  end
endmodule
