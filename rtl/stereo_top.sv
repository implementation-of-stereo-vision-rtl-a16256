// stereo_top: programmable-logic part of the stereo-vision pipeline.
//
// Data flow (one pixel per clock per camera once the buffers have filled):
//   interleaved camera stream (24 bit, 3 cameras)
//     -> deinterleave -> camera 0 = left, camera 1 = right, camera 2 brought out
//     -> per camera: demosaic (Bayer -> gray)
//                    -> spatial_transform, whose inverse-mapping chain is
//                       homography (rectification) then barrel_correction
//                       (lens distortion)  -> stream_fifo (output buffering)
//     -> left/right joined -> feature_extractor (x2) -> correspondence
//     -> lr_check -> disparity stream
// The image transport to and from memory (DMA masters) and the software
// around it are outside this module: the input and output streams are its
// ports, and every coefficient is a configuration input.
//
// Alignment: each windowed stage outputs the window centre, so the pixel
// positions shift by one row and column in demosaic and by two in feature
// extraction; a homography can absorb the first shift. The left/right join
// keeps the two cameras in lockstep from the FIFOs on, so the correspondence
// search always sees pixels of the same column.
// Mode inputs: recon_mode selects nearest or bilinear reconstruction;
// lr_enable turns the consistency filter on (off: every disparity is marked
// valid).
// Unused results: the demosaic RGB outputs and positions and the matching
// energies are not needed for the disparity stream and are left unread (lint
// reports them as unused). rst_n is both the asynchronous reset of the blocks
// and the disable condition of the lockstep assertions, which lint reports as
// a mixed synchronous/asynchronous use; the assertions are simulation-only.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int IMG_W      = 1280,
  parameter int IMG_H      = 960,
  parameter int D          = 128,
  parameter int NX         = 4,
  parameter int NY         = 4,
  parameter int DEPTH      = 8192,
  parameter int FIFO_DEPTH = 16,
  parameter int H_W        = 32,
  parameter int H_FRAC     = 20,
  parameter int K_W        = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  recon_mode_e recon_mode,
  input  logic [7:0]  back_rows,
  input  logic        lr_enable,
  input  logic signed [H_W-1:0] h_left  [9],
  input  logic signed [H_W-1:0] h_right [9],
  input  coord_t      xc_left, yc_left, xc_right, yc_right,
  input  logic [19:0] inv_ax_left, inv_ay_left, inv_ax_right, inv_ay_right,
  input  logic signed [K_W-1:0] k1_left, k2_left, k1_right, k2_right,
  // interleaved input stream (after the 24-bit width adapter)
  input  logic [3*PIX_W-1:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  // third camera, not used by the stereo pair
  output pixel_t      cam2_pix,
  output logic        cam2_valid,
  input  logic        cam2_ready,
  // disparity output stream
  output logic [$clog2(D)-1:0]     disp,
  output logic [$clog2(IMG_W)-1:0] disp_x,
  output logic        disp_ok,
  output logic        disp_valid,
  input  logic        disp_ready,
  // status strobes, [0] left, [1] right
  output logic [1:0]  ev_wait,
  output logic [1:0]  ev_full,
  output logic [1:0]  ev_outside
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);
  localparam int DW = $clog2(D);

  pixel_t     cam_pix [3];
  logic [2:0] cam_valid, cam_ready;

  deinterleave #(.PIX_W(PIX_W), .N_STREAMS(3)) u_deint (
    .in_data, .in_valid, .in_ready,
    .out_data(cam_pix), .out_valid(cam_valid), .out_ready(cam_ready));

  assign cam2_pix     = cam_pix[2];
  assign cam2_valid   = cam_valid[2];
  assign cam_ready[2] = cam2_ready;

  logic signed [H_W-1:0] hm [2][9];
  coord_t      xc [2], yc [2];
  logic [19:0] iax [2], iay [2];
  logic signed [K_W-1:0] k1 [2], k2 [2];
  assign hm[0] = h_left;   assign hm[1] = h_right;
  assign xc[0] = xc_left;  assign xc[1] = xc_right;
  assign yc[0] = yc_left;  assign yc[1] = yc_right;
  assign iax[0] = inv_ax_left; assign iax[1] = inv_ax_right;
  assign iay[0] = inv_ay_left; assign iay[1] = inv_ay_right;
  assign k1[0] = k1_left;  assign k1[1] = k1_right;
  assign k2[0] = k2_left;  assign k2[1] = k2_right;

  pixel_t fifo_pix [2];
  logic   fifo_valid [2];
  logic   join_ready;

  for (genvar s = 0; s < 2; s++) begin : g_cam
    pixel_t      gray, r_unused, g_unused, b_unused, tr_pix;
    logic [XW-1:0] gx;
    logic [YW-1:0] gy;
    logic        gray_valid, gray_ready, tr_valid, tr_ready;
    coord_pair_t oc, hc, rq;
    logic        oc_valid, oc_ready, hc_valid, hc_ready, rq_valid, rq_ready;

    demosaic #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_demosaic (
      .clk, .rst_n, .in_pix(cam_pix[s]), .in_valid(cam_valid[s]), .in_ready(cam_ready[s]),
      .out_r(r_unused), .out_g(g_unused), .out_b(b_unused), .out_gray(gray),
      .out_x(gx), .out_y(gy), .out_valid(gray_valid), .out_ready(gray_ready));

    spatial_transform #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NX(NX), .NY(NY), .DEPTH(DEPTH)) u_xform (
      .clk, .rst_n, .recon_mode, .back_rows,
      .in_pix(gray), .in_valid(gray_valid), .in_ready(gray_ready),
      .oc, .oc_valid, .oc_ready,
      .rq, .rq_valid, .rq_ready,
      .out_pix(tr_pix), .out_valid(tr_valid), .out_ready(tr_ready),
      .ev_wait(ev_wait[s]), .ev_full(ev_full[s]), .ev_outside(ev_outside[s]));

    homography #(.H_W(H_W), .H_FRAC(H_FRAC)) u_homography (
      .clk, .rst_n, .h(hm[s]),
      .in_c(oc), .in_valid(oc_valid), .in_ready(oc_ready),
      .out_c(hc), .out_valid(hc_valid), .out_ready(hc_ready));

    barrel_correction #(.K_W(K_W)) u_barrel (
      .clk, .rst_n, .x_center(xc[s]), .y_center(yc[s]),
      .inv_alpha_x(iax[s]), .inv_alpha_y(iay[s]), .k1(k1[s]), .k2(k2[s]),
      .in_c(hc), .in_valid(hc_valid), .in_ready(hc_ready),
      .out_c(rq), .out_valid(rq_valid), .out_ready(rq_ready));

    stream_fifo #(.W(PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .in_data(tr_pix), .in_valid(tr_valid), .in_ready(tr_ready),
      .out_data(fifo_pix[s]), .out_valid(fifo_valid[s]), .out_ready(join_ready));
  end

  // join: both cameras advance together
  logic        fe_in_valid, fe_in_ready_l, fe_in_ready_r;
  assign fe_in_valid = fifo_valid[0] && fifo_valid[1];
  assign join_ready  = fe_in_valid && fe_in_ready_l && fe_in_ready_r;

  descriptor_t desc_l, desc_r;
  logic [XW-1:0] fx_l, fx_r;
  logic [YW-1:0] fy_l, fy_r;
  logic        fe_valid_l, fe_valid_r, corr_in_ready;

  feature_extractor #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fe_l (
    .clk, .rst_n, .in_pix(fifo_pix[0]), .in_valid(join_ready), .in_ready(fe_in_ready_l),
    .out_desc(desc_l), .out_x(fx_l), .out_y(fy_l), .out_valid(fe_valid_l),
    .out_ready(corr_in_ready && fe_valid_r));
  feature_extractor #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fe_r (
    .clk, .rst_n, .in_pix(fifo_pix[1]), .in_valid(join_ready), .in_ready(fe_in_ready_r),
    .out_desc(desc_r), .out_x(fx_r), .out_y(fy_r), .out_valid(fe_valid_r),
    .out_ready(corr_in_ready && fe_valid_l));

  logic [DW-1:0] dl, dr;
  energy_t       el, er;
  logic [XW-1:0] xl, xr;
  logic          rok, corr_valid, lr_in_ready;

  correspondence #(.D(D), .IMG_W(IMG_W)) u_corr (
    .clk, .rst_n, .in_left(desc_l), .in_right(desc_r), .in_x(fx_l),
    .in_valid(fe_valid_l && fe_valid_r), .in_ready(corr_in_ready),
    .disp_l(dl), .energy_l(el), .x_l(xl),
    .disp_r(dr), .energy_r(er), .x_r(xr), .r_ok(rok),
    .out_valid(corr_valid), .out_ready(lr_in_ready));

  logic lr_ok;
  lr_check #(.D(D), .IMG_W(IMG_W)) u_lr (
    .clk, .rst_n, .disp_l(dl), .x_l(xl), .disp_r(dr), .x_r(xr), .r_ok(rok),
    .in_valid(corr_valid), .in_ready(lr_in_ready),
    .out_disp(disp), .out_x(disp_x), .out_ok(lr_ok),
    .out_valid(disp_valid), .out_ready(disp_ready));

  assign disp_ok = lr_enable ? lr_ok : 1'b1;

  // the two cameras' feature extractors run in lockstep
  assert property (@(posedge clk) disable iff (!rst_n) fe_valid_l == fe_valid_r);
  assert property (@(posedge clk) disable iff (!rst_n) fe_valid_l |-> fx_l == fx_r && fy_l == fy_r);
endmodule
