// sliding_window: K x K neighbourhood of a raster-scanned pixel stream.
//
// K-1 line buffers of IMG_W pixels hold the previous rows. For every accepted
// input pixel the window shifts one column left and takes in a new column made
// of the pixel and the K-1 pixels above it, so each input pixel yields one
// window whose bottom-right element is that pixel. The window centre is thus
// K/2 rows and K/2 columns behind the newest pixel; windows near the left,
// top or right border mix pixels of neighbouring rows and are not meaningful.
// out_x/out_y give the position of the newest pixel, from which consumers
// derive the centre position.
//
// Interface: valid/ready stream in, registered window out (1 cycle latency);
// the stage stalls while out_valid is held and out_ready is low.
// The line-buffer approach is the usual one the pipeline relies on; the
// buffer organisation and the output alignment are this design's choices.
module sliding_window #(
  parameter int K     = 3,
  parameter int IMG_W = 1280,
  parameter int IMG_H = 960,
  parameter int PIX_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PIX_W-1:0]   in_pix,
  input  logic               in_valid,
  output logic               in_ready,
  output logic [PIX_W-1:0]   out_win [K][K],   // [row][col], row 0 = oldest
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic               out_valid,
  input  logic               out_ready
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);

  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;
  logic          ce, fire;
  logic [PIX_W-1:0] new_col [K];

  assign ce       = !out_valid || out_ready;
  assign in_ready = ce;
  assign fire     = in_valid && ce;

  // line buffer r holds the row r+1 rows above the current one; each is a
  // separate single-write-port memory (read and rewritten at x_cnt)
  logic [PIX_W-1:0] lb_rd [K-1];
  for (genvar r = 0; r < K-1; r++) begin : g_lb
    logic [PIX_W-1:0] mem [IMG_W];
    assign lb_rd[r] = mem[x_cnt];
    always_ff @(posedge clk)
      if (fire) mem[x_cnt] <= (r == 0) ? in_pix : lb_rd[r == 0 ? 0 : r-1];
  end

  always_comb begin
    for (int r = 0; r < K-1; r++)
      new_col[r] = lb_rd[K-2-r];
    new_col[K-1] = in_pix;
  end

  always_ff @(posedge clk) begin
    if (fire) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K-1; c++)
          out_win[r][c] <= out_win[r][c+1];
        out_win[r][K-1] <= new_col[r];
      end
      out_x <= x_cnt;
      out_y <= y_cnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt     <= '0;
      y_cnt     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (ce) out_valid <= in_valid;
      if (fire) begin
        if (x_cnt == XW'(IMG_W-1)) begin
          x_cnt <= '0;
          y_cnt <= (y_cnt == YW'(IMG_H-1)) ? '0 : y_cnt + 1'b1;
        end else begin
          x_cnt <= x_cnt + 1'b1;
        end
      end
    end
  end
endmodule
