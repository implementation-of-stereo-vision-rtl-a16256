// correspondence: simultaneous left-to-right and right-to-left disparity
// search over D candidates.
//
// Left and right descriptors arrive in lockstep, one pair per accepted
// cycle, together with their column. Each is shifted into a serial-in
// parallel-out (SIPO) buffer of D entries (entry k = pixel k columns back).
//   left-to-right: the newest left pixel (column x) is compared with right
//     pixels x - d, d = 0..D-1 (right SIPO entry d);
//   right-to-left: the right pixel D-1 columns back (x - D + 1) is compared
//     with left pixels x - D + 1 + d (left SIPO entry D-1-d).
// 2*D feature_comparator instances compute the energies in parallel; a
// candidate whose pixel lies in another image row (column bookkeeping)
// gets the maximum energy. Two corr_search trees then return the least
// energy and its index d, which is the disparity.
//
// Interface: valid/ready in, one result pair out per input pair. The left
// result belongs to the newest left pixel, the right result to the right
// pixel D-1 columns back (r_ok is low until the SIPO has been filled).
// Latency: SIPO 1 + comparators 1 + log2(D) search cycles; the pipeline
// stalls as a whole on out_ready low.
// The SIPO/comparator/search organisation and D = 128 follow the original
// design; the column-based row handling is this design's choice.
module correspondence
  import stereo_pkg::*;
#(
  parameter int D     = 128,
  parameter int IMG_W = 1280
) (
  input  logic        clk,
  input  logic        rst_n,
  input  descriptor_t in_left,
  input  descriptor_t in_right,
  input  logic [$clog2(IMG_W)-1:0] in_x,
  input  logic        in_valid,
  output logic        in_ready,
  // left-to-right result for the newest left pixel
  output logic [$clog2(D)-1:0] disp_l,
  output energy_t     energy_l,
  output logic [$clog2(IMG_W)-1:0] x_l,
  // right-to-left result for the right pixel D-1 columns back
  output logic [$clog2(D)-1:0] disp_r,
  output energy_t     energy_r,
  output logic [$clog2(IMG_W)-1:0] x_r,
  output logic        r_ok,
  output logic        out_valid,
  input  logic        out_ready
);
  localparam int DW  = $clog2(D);
  localparam int XW  = $clog2(IMG_W);
  localparam int LAT = 2 + DW;

  logic ce, fire;
  logic [LAT-1:0] vld;
  assign ce        = !vld[LAT-1] || out_ready;
  assign in_ready  = ce;
  assign fire      = in_valid && ce;
  assign out_valid = vld[LAT-1];

  descriptor_t sipo_l [D], sipo_r [D];
  logic [XW-1:0] sipo_x [D];
  logic [DW:0]   fill;

  always_ff @(posedge clk) begin
    if (fire) begin
      sipo_l[0] <= in_left;
      sipo_r[0] <= in_right;
      sipo_x[0] <= in_x;
      for (int k = 1; k < D; k++) begin
        sipo_l[k] <= sipo_l[k-1];
        sipo_r[k] <= sipo_r[k-1];
        sipo_x[k] <= sipo_x[k-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      fill <= '0;
    end else begin
      if (ce) vld <= {vld[LAT-2:0], in_valid};
      if (fire && fill != (DW+1)'(D)) fill <= fill + 1'b1;
    end
  end

  // comparators
  energy_t e_lr [D], e_rl [D];
  energy_t e_lr_q [D], e_rl_q [D];
  logic [DW-1:0] idx [D];
  for (genvar d = 0; d < D; d++) begin : g_cmp
    energy_t raw_lr, raw_rl;
    feature_comparator u_lr (.a(sipo_l[0]),     .b(sipo_r[d]),     .energy(raw_lr));
    feature_comparator u_rl (.a(sipo_r[D-1]),   .b(sipo_l[D-1-d]), .energy(raw_rl));
    always_comb begin
      // same row: the candidate lies exactly d columns away
      e_lr[d] = (int'(sipo_x[0]) - d == int'(sipo_x[d]) && fill > (DW+1)'(d))
              ? raw_lr : '1;
      e_rl[d] = (int'(sipo_x[D-1]) + d == int'(sipo_x[D-1-d])) ? raw_rl : '1;
      idx[d]  = DW'(d);
    end
  end

  logic [XW-1:0] xl_q [DW+1], xr_q [DW+1];
  logic          rok_q [DW+1];
  always_ff @(posedge clk) begin
    if (ce) begin
      e_lr_q   <= e_lr;
      e_rl_q   <= e_rl;
      xl_q[0]  <= sipo_x[0];
      xr_q[0]  <= sipo_x[D-1];
      rok_q[0] <= (fill == (DW+1)'(D));
      for (int i = 1; i <= DW; i++) begin
        xl_q[i] <= xl_q[i-1]; xr_q[i] <= xr_q[i-1]; rok_q[i] <= rok_q[i-1];
      end
    end
  end

  corr_search #(.N(D), .EW(ENERGY_W), .IW(DW)) u_srch_l (
    .clk, .ce, .energy(e_lr_q), .index(idx), .min_energy(energy_l), .min_index(disp_l));
  corr_search #(.N(D), .EW(ENERGY_W), .IW(DW)) u_srch_r (
    .clk, .ce, .energy(e_rl_q), .index(idx), .min_energy(energy_r), .min_index(disp_r));

  assign x_l  = xl_q[DW];
  assign x_r  = xr_q[DW];
  assign r_ok = rok_q[DW];
endmodule
