// goldschmidt_div: pipelined reciprocal by Goldschmidt iteration.
//
// The divisor d (unsigned, D_W bits with D_FRAC fractional bits) is first
// normalised by a leading-one detector into w in [0.5, 1); the iteration
// needs a divisor in (0, 1]. Each iteration then computes F = 2 - D and
// multiplies both the running numerator N (starting at 1) and D by F, so D
// converges quadratically to 1 and N to 1/w: the error after k steps is
// (1-w)^(2^k) <= 2^-(2^k). A final shifter undoes the normalisation and
// returns 1/d with R_FRAC fractional bits, saturated to R_W bits.
// d = 0 gives the saturated maximum and raises out_zero.
//
// Timing: one register stage for normalisation, one per iteration and one
// for denormalisation, so the latency is ITER + 2 cycles at one result per
// cycle. All stages advance on ce (the enclosing pipeline's stall enable).
// The use of Goldschmidt division with a normalising front end follows the
// original rectification circuit; formats and iteration count are this
// design's choices.
module goldschmidt_div #(
  parameter int D_W    = 32,
  parameter int D_FRAC = 24,
  parameter int R_W    = 32,
  parameter int R_FRAC = 24,
  parameter int ITER   = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic [D_W-1:0] in_d,
  input  logic           in_valid,
  output logic [R_W-1:0] out_recip,
  output logic           out_zero,
  output logic           out_valid
);
  localparam int MF  = 30;                 // mantissa fraction bits (Q2.30)
  localparam int PW  = $clog2(D_W) + 1;
  localparam int LAT = ITER + 2;

  // normalisation
  logic [PW-1:0] lead;
  logic [D_W-1:0] d_norm;
  always_comb begin
    lead = '0;
    for (int i = 0; i < D_W; i++)
      if (in_d[i]) lead = PW'(i);
    d_norm = in_d << (D_W - 1 - int'(lead));
  end

  logic [31:0]   n_q [ITER+1];
  logic [31:0]   d_q [ITER+1];
  logic [PW-1:0] lead_q [ITER+1];
  logic          zero_q [ITER+1];
  logic [LAT-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

  always_ff @(posedge clk) begin
    if (ce) begin
      n_q[0]    <= 32'(1) << MF;
      // top bits of the normalised divisor as Q2.30 in [0.5, 1)
      if (D_W >= MF)
        d_q[0] <= 32'(d_norm[D_W-1 -: MF]);
      else
        d_q[0] <= 32'(d_norm) << (MF - D_W);
      lead_q[0] <= lead;
      zero_q[0] <= (in_d == '0);
      for (int k = 0; k < ITER; k++) begin
        logic [31:0] f;
        logic [63:0] pn, pd;
        f  = (32'(2) << MF) - d_q[k];
        pn = 64'(n_q[k]) * 64'(f);
        pd = 64'(d_q[k]) * 64'(f);
        n_q[k+1]    <= pn[MF +: 32];
        d_q[k+1]    <= pd[MF +: 32];
        lead_q[k+1] <= lead_q[k];
        zero_q[k+1] <= zero_q[k];
      end
    end
  end

  // denormalise: 1/d = N * 2^(D_FRAC - lead - 1); N has MF fraction bits.
  logic [R_W-1:0] recip_n;
  always_comb begin
    int sh;
    logic [127:0] wide;
    sh   = D_FRAC - int'(lead_q[ITER]) - 1 + R_FRAC - MF;
    wide = 128'(n_q[ITER]);
    if (sh >= 0) wide = wide << sh;
    else         wide = wide >> (-sh);
    if (zero_q[ITER] || (wide >> R_W) != 0)
      recip_n = '1;
    else
      recip_n = wide[R_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      out_recip <= recip_n;
      out_zero  <= zero_q[ITER];
    end
  end
endmodule
