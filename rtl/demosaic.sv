// demosaic: bilinear Bayer interpolation with optional grayscale output.
//
// The Bayer mosaic repeats G R / B G: even rows alternate green and red
// starting with green, odd rows alternate blue and green. A 3x3 sliding
// window feeds a pattern state machine that, from the parity of the window
// centre, picks one of four cases and routes pixels to two 4-input pipelined
// adders:
//   green on a red row  : R = W+E, B = N+S   (each pair fed twice)
//   red                 : G = N+S+W+E, B = four diagonals
//   blue                : G = N+S+W+E, R = four diagonals
//   green on a blue row : B = W+E, R = N+S   (each pair fed twice)
// Adder outputs are divided by 4 by dropping two LSBs. The centre pixel and
// the state are delayed alongside the adders, and a channel demultiplexer
// places centre and the two sums on R, G and B. The grayscale value is the
// lightness (max(R,G,B) + min(R,G,B)) / 2.
//
// Interface: pixel stream in (valid/ready), RGB and gray out. The output
// pixel is the window centre, i.e. it lags the input by one row and one
// column (see sliding_window); out_x/out_y give the centre position.
// Latency: 1 cycle window + 4 pipeline stages; the whole pipeline stalls
// together when out_ready is low.
// The algorithm, the four cases, the doubling of pairs, the divide-by-4 and
// the lightness formula follow the original design; pipeline depth and
// border handling are this design's choices.
module demosaic
  import stereo_pkg::*;
#(
  parameter int IMG_W = 1280,
  parameter int IMG_H = 960
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pixel_t in_pix,
  input  logic   in_valid,
  output logic   in_ready,
  output pixel_t out_r,
  output pixel_t out_g,
  output pixel_t out_b,
  output pixel_t out_gray,
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y,
  output logic   out_valid,
  input  logic   out_ready
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);

  typedef enum logic [1:0] {
    ST_G_ON_R = 2'd0,
    ST_RED    = 2'd1,
    ST_BLUE   = 2'd2,
    ST_G_ON_B = 2'd3
  } bayer_state_e;

  pixel_t win [3][3];
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;
  logic win_valid, win_ready;
  logic ce;

  sliding_window #(.K(3), .IMG_W(IMG_W), .IMG_H(IMG_H), .PIX_W(PIX_W)) u_win (
    .clk, .rst_n, .in_pix, .in_valid, .in_ready,
    .out_win(win), .out_x(wx), .out_y(wy),
    .out_valid(win_valid), .out_ready(win_ready)
  );

  // Pipeline: s1 state+mux, s2 pair sums, s3 quad sums, s4 demux+gray.
  logic [3:0] vld;
  assign ce        = !vld[3] || out_ready;
  assign win_ready = ce;
  assign out_valid = vld[3];

  bayer_state_e st_now;
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  always_comb begin
    // centre lags the newest pixel by one column and row (wrapping within
    // the frame, whose size need not be a power of two)
    cx = (wx == '0) ? XW'(IMG_W - 1) : wx - 1'b1;
    cy = (wy == '0) ? YW'(IMG_H - 1) : wy - 1'b1;
    unique case ({cy[0], cx[0]})
      2'b00:   st_now = ST_G_ON_R;
      2'b01:   st_now = ST_RED;
      2'b10:   st_now = ST_BLUE;
      default: st_now = ST_G_ON_B;
    endcase
  end

  pixel_t       a_in [4], b_in [4];
  pixel_t       centre [4];
  bayer_state_e st [4];
  logic [PIX_W:0]   a_pair [2], b_pair [2];
  logic [PIX_W+1:0] a_sum, b_sum;
  logic [XW-1:0] px [4];
  logic [YW-1:0] py [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (ce) vld <= {vld[2:0], win_valid};
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      // s1: pattern state machine and pixel multiplexing
      unique case (st_now)
        ST_G_ON_R: begin
          a_in <= '{win[1][0], win[1][2], win[1][0], win[1][2]};  // R: W,E
          b_in <= '{win[0][1], win[2][1], win[0][1], win[2][1]};  // B: N,S
        end
        ST_G_ON_B: begin
          a_in <= '{win[0][1], win[2][1], win[0][1], win[2][1]};  // R: N,S
          b_in <= '{win[1][0], win[1][2], win[1][0], win[1][2]};  // B: W,E
        end
        default: begin  // red or blue centre
          a_in <= '{win[0][1], win[2][1], win[1][0], win[1][2]};  // G: cross
          b_in <= '{win[0][0], win[0][2], win[2][0], win[2][2]};  // diagonals
        end
      endcase
      centre[0] <= win[1][1];
      st[0]     <= st_now;
      px[0] <= cx;  py[0] <= cy;
      // s2: first adder level
      a_pair[0] <= a_in[0] + a_in[1];
      a_pair[1] <= a_in[2] + a_in[3];
      b_pair[0] <= b_in[0] + b_in[1];
      b_pair[1] <= b_in[2] + b_in[3];
      centre[1] <= centre[0]; st[1] <= st[0]; px[1] <= px[0]; py[1] <= py[0];
      // s3: second adder level
      a_sum <= a_pair[0] + a_pair[1];
      b_sum <= b_pair[0] + b_pair[1];
      centre[2] <= centre[1]; st[2] <= st[1]; px[2] <= px[1]; py[2] <= py[1];
    end
  end

  // s4: channel demultiplexer and lightness conversion
  pixel_t a_div, b_div, r_n, g_n, b_n, mx, mn;
  logic [PIX_W:0] light;
  always_comb begin
    a_div = a_sum[PIX_W+1:2];
    b_div = b_sum[PIX_W+1:2];
    unique case (st[2])
      ST_G_ON_R, ST_G_ON_B: begin r_n = a_div;     g_n = centre[2]; b_n = b_div;     end
      ST_RED:               begin r_n = centre[2]; g_n = a_div;     b_n = b_div;     end
      default:              begin r_n = b_div;     g_n = a_div;     b_n = centre[2]; end
    endcase
    mx = (r_n > g_n) ? r_n : g_n;
    mx = (b_n > mx)  ? b_n : mx;
    mn = (r_n < g_n) ? r_n : g_n;
    mn = (b_n < mn)  ? b_n : mn;
    light = mx + mn;
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      out_r    <= r_n;
      out_g    <= g_n;
      out_b    <= b_n;
      out_gray <= light[PIX_W:1];
      out_x    <= px[2];
      out_y    <= py[2];
    end
  end
endmodule
