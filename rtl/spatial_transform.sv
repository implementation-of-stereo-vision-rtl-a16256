// spatial_transform: fully pipelined generic spatial image transformation
// (lens-distortion correction, rectification, zoom) with parallel
// neighbourhood access for reconstruction.
//
// The input image streams in raster order and is written into a ring buffer
// made of an NY x NX memory matrix (memory_matrix): pixel (x, y) goes to
// memory (y mod NY, x mod NX) at the shared linear address
// (y / NY) * (W / NX) + x / NX, modulo DEPTH. The output image is produced by
// inverse mapping: the output coordinate counter emits every output position
// on oc_*, an external inverse-transformation block returns the input-image
// position it must be taken from on rq_* (signed, 4 fraction bits), and the
// control logic compares that "required" position with the input coordinate
// counter. While the required NY x NX neighbourhood is not yet buffered, the
// request is stalled (and with it the external block and the output
// coordinate counter); once it is, all NY x NX pixels are read in one cycle
// (read_access_gen, memory_matrix), reordered (data_rearrange) and
// reconstructed. Writing and reading proceed simultaneously, one pixel per
// cycle each, once the buffer has filled.
//
// Reconstruction: nearest neighbour (recon_mode = RECON_NEAREST, rounding
// the fraction) or bilinear over the central 2x2 of the window, with 4-bit
// weights. Requests whose integer position lies outside 0..W-2, 0..H-2 give
// a black pixel without waiting.
//
// Buffer overwrite protection: the input is held back (in_ready low) when
// writing would overwrite the block row holding row
//   top(last request) - back_rows,
// where top is the first window row of the most recent accepted request.
// back_rows must cover how far later requests reach above earlier ones (the
// bowing of transformed rows). The buffer is organised in block rows of NY
// image rows, W/NX words each; the rows from the kept one down to the lowest
// row a request needs must fit, which gives the rule
//   (ceil((NY - 1 + back_rows + jump) / NY) + 1) * W/NX <= DEPTH,
// jump being the largest downward step between consecutive requests (0 for
// a pure translation). With the defaults (W = 1280, DEPTH = 8192) back_rows
// may be up to 93 - jump; otherwise the input and the requests wait for each
// other for ever.
//
// Frames: after W*H input pixels the input stops until all W*H output pixels
// have left; then both counters and the buffer ring restart.
// Timing: request accepted -> pixel at out_* 4 cycles later; the read path
// stalls as a whole on out_ready low. Status strobes count stalls (ev_wait),
// held-back input (ev_full) and outside requests (ev_outside).
// The architecture (coordinate counters, comparing control logic, memory
// matrix with write demultiplexing and per-memory read addresses, external
// inverse transformation on a stream interface) follows the original design;
// the stall rules at frame and buffer limits, back_rows and the bilinear
// weights are this design's choices.
// Of the request and output raster counters only the end-of-frame flag is
// used, so their position outputs are left unconnected on purpose.
module spatial_transform
  import stereo_pkg::*;
#(
  parameter int IMG_W = 1280,
  parameter int IMG_H = 960,
  parameter int NX    = 4,
  parameter int NY    = 4,
  parameter int DEPTH = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  recon_mode_e recon_mode,
  input  logic [7:0]  back_rows,
  // input image stream
  input  pixel_t      in_pix,
  input  logic        in_valid,
  output logic        in_ready,
  // output coordinates towards the inverse transformation
  output coord_pair_t oc,
  output logic        oc_valid,
  input  logic        oc_ready,
  // required input coordinates from the inverse transformation
  input  coord_pair_t rq,
  input  logic        rq_valid,
  output logic        rq_ready,
  // output image stream
  output pixel_t      out_pix,
  output logic        out_valid,
  input  logic        out_ready,
  // status strobes
  output logic        ev_wait,
  output logic        ev_full,
  output logic        ev_outside
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);
  localparam int LX = $clog2(NX);
  localparam int LY = $clog2(NY);
  localparam int AW = $clog2(DEPTH);
  localparam int C2 = IMG_W / NX;
  localparam int LW = XW + YW + 2;                 // linear address width
  localparam int RI = COORD_INT;                   // request integer width

  // ---------------------------------------------------------------- counters
  logic [XW-1:0] in_x, oc_x;
  logic [YW-1:0] in_y, oc_y;
  logic in_last, oc_last, out_last, rq_last;
  logic in_done, oc_done, req_done;
  logic in_fire, oc_fire, rq_fire, out_fire, frame_end;

  assign out_fire  = out_valid && out_ready;
  assign frame_end = out_fire && out_last;

  raster_counter #(.W(IMG_W), .H(IMG_H)) u_in_cnt (
    .clk, .rst_n, .clear(frame_end), .inc(in_fire), .x(in_x), .y(in_y), .last(in_last));
  raster_counter #(.W(IMG_W), .H(IMG_H)) u_oc_cnt (
    .clk, .rst_n, .clear(frame_end), .inc(oc_fire), .x(oc_x), .y(oc_y), .last(oc_last));
  raster_counter #(.W(IMG_W), .H(IMG_H)) u_rq_cnt (
    .clk, .rst_n, .clear(frame_end), .inc(rq_fire), .x(), .y(), .last(rq_last));
  raster_counter #(.W(IMG_W), .H(IMG_H)) u_out_cnt (
    .clk, .rst_n, .clear(1'b0), .inc(out_fire), .x(), .y(), .last(out_last));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_done <= 1'b0; oc_done <= 1'b0; req_done <= 1'b0;
    end else if (frame_end) begin
      in_done <= 1'b0; oc_done <= 1'b0; req_done <= 1'b0;
    end else begin
      if (in_fire && in_last) in_done  <= 1'b1;
      if (oc_fire && oc_last) oc_done  <= 1'b1;
      if (rq_fire && rq_last) req_done <= 1'b1;
    end
  end

  // ------------------------------------------------- output coordinate counter
  assign oc_valid = !oc_done;
  assign oc.x     = coord_t'({{(RI-XW){1'b0}}, oc_x, {COORD_FRAC{1'b0}}});
  assign oc.y     = coord_t'({{(RI-YW){1'b0}}, oc_y, {COORD_FRAC{1'b0}}});
  assign oc_fire  = oc_valid && oc_ready;

  // ------------------------------------------------------------ control logic
  logic ce;
  logic [3:0] vld;
  assign ce        = !vld[3] || out_ready;
  assign out_valid = vld[3];

  logic signed [RI-1:0] xi, yi;
  logic [COORD_FRAC-1:0] fx, fy;
  logic outside, avail;
  logic signed [RI+1:0] need_x, need_y;
  always_comb begin
    xi = RI'(rq.x >>> COORD_FRAC);
    yi = RI'(rq.y >>> COORD_FRAC);
    fx = rq.x[COORD_FRAC-1:0];
    fy = rq.y[COORD_FRAC-1:0];
    outside = (xi < 0) || (xi > RI'(IMG_W-2)) || (yi < 0) || (yi > RI'(IMG_H-2));
    need_x = (RI+2)'(xi) + (RI+2)'(NX/2);
    need_y = (RI+2)'(yi) + (RI+2)'(NY/2);
    if (need_x > (RI+2)'(IMG_W-1)) need_x = (RI+2)'(IMG_W-1);
    if (need_y > (RI+2)'(IMG_H-1)) need_y = (RI+2)'(IMG_H-1);
    avail = in_done
         || ((RI+2)'(in_y) > need_y)
         || (((RI+2)'(in_y) == need_y) && ((RI+2)'(in_x) > need_x));
  end

  assign rq_ready   = ce && !req_done && (outside || avail);
  assign rq_fire    = rq_valid && rq_ready;
  assign ev_wait    = rq_valid && ce && !req_done && !outside && !avail;
  assign ev_outside = rq_fire && outside;

  // oldest row still needed
  logic signed [RI+9:0] keep_row;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      keep_row <= '0;
    else if (frame_end)
      keep_row <= '0;
    else if (rq_fire && !outside)
      keep_row <= (RI+10)'(yi) - (RI+10)'(NY/2 - 1) - (RI+10)'(back_rows);
  end

  // ------------------------------------------------------------- write side
  logic [LW-1:0] wr_lin, keep_lin;
  logic [YW-1:0] keep_row_c;
  logic          wr_ok;
  always_comb begin
    keep_row_c = (keep_row < 0) ? '0 : YW'(keep_row);
    wr_lin     = LW'(LW'(in_y >> LY) * LW'(C2)) + LW'(in_x >> LX);
    keep_lin   = LW'(LW'(keep_row_c >> LY) * LW'(C2));
    wr_ok      = (wr_lin - keep_lin) < LW'(DEPTH);
  end
  assign in_ready = !in_done && wr_ok;
  assign in_fire  = in_valid && in_ready;
  assign ev_full  = in_valid && !in_done && !wr_ok;

  // --------------------------------------------------------------- read path
  logic [AW-1:0]    rd_addr [NY][NX];
  logic [LX-1:0]    xl2;
  logic [LY-1:0]    yl2;
  logic [LX-1:0]    xl3;
  logic [LY-1:0]    yl3;
  pixel_t           rd_data [NY][NX];
  pixel_t           win [NY][NX];
  logic             out_d [3];
  logic [COORD_FRAC-1:0] fx_d [3], fy_d [3];

  read_access_gen #(.NX(NX), .NY(NY), .AW(AW), .XW(RI), .YW(RI)) u_rag (
    .clk, .ce, .c2(AW'(C2)), .xi(xi), .yi(yi),
    .addr(rd_addr), .xl_out(xl2), .yl_out(yl2));

  memory_matrix #(.NX(NX), .NY(NY), .DEPTH(DEPTH), .PIX_W(PIX_W)) u_mem (
    .clk,
    .wr_en(in_fire), .wr_col(in_x[LX-1:0]), .wr_row(in_y[LY-1:0]),
    .wr_addr(wr_lin[AW-1:0]), .wr_data(in_pix),
    .rd_en(ce), .rd_addr(rd_addr), .rd_data(rd_data));

  data_rearrange #(.NX(NX), .NY(NY), .PIX_W(PIX_W)) u_rearr (
    .mem_data(rd_data), .xl(xl3), .yl(yl3), .win(win));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[2:0], rq_fire};
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      out_d[0] <= outside; fx_d[0] <= fx; fy_d[0] <= fy;
      for (int i = 1; i < 3; i++) begin
        out_d[i] <= out_d[i-1]; fx_d[i] <= fx_d[i-1]; fy_d[i] <= fy_d[i-1];
      end
      xl3 <= xl2;
      yl3 <= yl2;
    end
  end

  // reconstruction
  localparam int CI = NY/2 - 1;
  localparam int CJ = NX/2 - 1;
  pixel_t recon;
  always_comb begin
    logic [PIX_W+9:0] acc;
    logic [4:0] wx1, wy1, wx0, wy0;
    wx1 = {1'b0, fx_d[2]};  wx0 = 5'd16 - wx1;
    wy1 = {1'b0, fy_d[2]};  wy0 = 5'd16 - wy1;
    acc = (PIX_W+10)'(win[CI][CJ])     * wx0 * wy0
        + (PIX_W+10)'(win[CI][CJ+1])   * wx1 * wy0
        + (PIX_W+10)'(win[CI+1][CJ])   * wx0 * wy1
        + (PIX_W+10)'(win[CI+1][CJ+1]) * wx1 * wy1
        + (PIX_W+10)'(128);
    if (out_d[2])
      recon = '0;
    else if (recon_mode == RECON_BILINEAR)
      recon = acc[PIX_W+7:8];
    else
      recon = win[CI + int'(fy_d[2][COORD_FRAC-1])][CJ + int'(fx_d[2][COORD_FRAC-1])];
  end

  always_ff @(posedge clk) begin
    if (ce) out_pix <= recon;
  end

  // stream rules: a stalled output holds its pixel; no request is taken
  // between the last request of a frame and the end of that frame
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_pix));
  assert property (@(posedge clk) disable iff (!rst_n) req_done |-> !rq_fire);
endmodule
