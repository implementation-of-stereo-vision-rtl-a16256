// feature_extractor: per-pixel descriptor for stereo matching.
//
// A 5x5 sliding window over the grayscale image feeds four extractors that
// run in parallel, fully pipelined:
//   intensity  - the centre pixel;
//   sobel_h    - horizontal Sobel ([1 2 1]^T x [-1 0 1]) at the left and at
//                the right neighbour of the centre;
//   sobel_v    - vertical Sobel at the centre;
//   census     - 24-bit census transform of the 5x5 region: bit i is 1 when
//                neighbour i (raster order, centre skipped, bit 0 = top-left)
//                is darker than the centre.
// The Sobel filters take two stages (column sums, then difference); the
// census and intensity paths are delayed to match, and all four are packed
// into a stereo_pkg::descriptor_t.
//
// Interface: grayscale pixel stream in (valid/ready), descriptor stream out;
// the descriptor belongs to the window centre, 2 rows and 2 columns behind
// the newest pixel (out_x/out_y give its position). Latency: 1 cycle window
// + 2 stages; stalls as a whole on out_ready low.
// The feature set and the 5x5 census follow the demonstrator; kernel signs,
// bit order and widths are this design's choices.
module feature_extractor
  import stereo_pkg::*;
#(
  parameter int IMG_W = 1280,
  parameter int IMG_H = 960
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pixel_t      in_pix,
  input  logic        in_valid,
  output logic        in_ready,
  output descriptor_t out_desc,
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic        out_valid,
  input  logic        out_ready
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);

  pixel_t w [5][5];
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;
  logic win_valid, ce;
  logic [1:0] vld;

  assign ce        = !vld[1] || out_ready;
  assign out_valid = vld[1];

  sliding_window #(.K(5), .IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_win (
    .clk, .rst_n, .in_pix, .in_valid, .in_ready,
    .out_win(w), .out_x(wx), .out_y(wy), .out_valid(win_valid), .out_ready(ce));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[0], win_valid};
  end

  // column (vertical) sums for horizontal Sobel, row sums for vertical Sobel
  function automatic logic [PIX_W+1:0] tri3(input pixel_t a, input pixel_t b, input pixel_t c);
    return (PIX_W+2)'(a) + ((PIX_W+2)'(b) << 1) + (PIX_W+2)'(c);
  endfunction

  logic [PIX_W+1:0] colsum [5];     // rows 1..3 weighted, per column
  logic [PIX_W+1:0] rowsum_t, rowsum_b;
  logic [CENSUS_W-1:0] census1;
  pixel_t           centre1;

  always_ff @(posedge clk) begin
    if (ce) begin
      // stage 1
      for (int c = 0; c < 5; c++)
        colsum[c] <= tri3(w[1][c], w[2][c], w[3][c]);
      rowsum_t <= tri3(w[1][1], w[1][2], w[1][3]);
      rowsum_b <= tri3(w[3][1], w[3][2], w[3][3]);
      begin
        int b;
        b = 0;
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 5; c++)
            if (!(r == 2 && c == 2)) begin
              census1[b] <= (w[r][c] < w[2][2]);
              b++;
            end
      end
      centre1 <= w[2][2];
      // stage 2
      out_desc.intensity     <= centre1;
      out_desc.sobel_h_left  <= sobel_t'(colsum[2]) - sobel_t'(colsum[0]);
      out_desc.sobel_h_right <= sobel_t'(colsum[4]) - sobel_t'(colsum[2]);
      out_desc.sobel_v       <= sobel_t'(rowsum_b) - sobel_t'(rowsum_t);
      out_desc.census        <= census1;
    end
  end

  // centre position: two columns and rows behind the newest pixel
  logic [XW-1:0] x1;
  logic [YW-1:0] y1;
  always_ff @(posedge clk) begin
    if (ce) begin
      // centre position, wrapping within the frame
      x1 <= (wx < XW'(2)) ? wx + XW'(IMG_W - 2) : wx - XW'(2);
      y1 <= (wy < YW'(2)) ? wy + YW'(IMG_H - 2) : wy - YW'(2);
      out_x <= x1;
      out_y <= y1;
    end
  end
endmodule
