// tb_feature_extractor: two random 12x8 grayscale frames with random gaps
// and stalls. For every output whose 5x5 window lies inside the frame the
// intensity, both horizontal Sobel values, the vertical Sobel value and the
// 24-bit census are compared with values computed here from the image; the
// stall-free latency from input pixel to descriptor is 3 cycles.
module tb_feature_extractor;
  import stereo_pkg::*;
  localparam int W = 12, H = 8;
  logic clk = 0, rst_n = 0;
  pixel_t in_pix;
  logic in_valid, in_ready, out_valid, out_ready;
  descriptor_t out_desc;
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;
  int checks = 0, failures = 0, nout = 0, idx = 0;
  int img [2][H][W];
  bit stall = 0;
  longint cyc = 0, t_in0 = -1, t_out0 = -1;

  feature_extractor #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        if (idx < 2*W*H && (!stall || $urandom_range(0, 3) != 0)) begin
          in_pix   <= pixel_t'(img[idx/(W*H)][(idx%(W*H))/W][idx%W]);
          in_valid <= 1;
          if (idx == 0) t_in0 <= $time / 10;
          idx      <= idx + 1;
        end else in_valid <= 0;
      end
      out_ready <= !stall || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int f, nx, ny, cx, cy, gl, gr, gv, b;
        logic [23:0] cen;
        if (nout == 0) t_out0 = $time / 10;
        f = nout / (W*H); nx = nout % W; ny = (nout / W) % H;
        if (nx >= 4 && ny >= 4) begin
          cx = nx - 2; cy = ny - 2;
          // Sobel-x at column c: right column minus left column, weights 1 2 1
          gl = (img[f][cy-1][cx]   + 2*img[f][cy][cx]   + img[f][cy+1][cx])
             - (img[f][cy-1][cx-2] + 2*img[f][cy][cx-2] + img[f][cy+1][cx-2]);
          gr = (img[f][cy-1][cx+2] + 2*img[f][cy][cx+2] + img[f][cy+1][cx+2])
             - (img[f][cy-1][cx]   + 2*img[f][cy][cx]   + img[f][cy+1][cx]);
          gv = (img[f][cy+1][cx-1] + 2*img[f][cy+1][cx] + img[f][cy+1][cx+1])
             - (img[f][cy-1][cx-1] + 2*img[f][cy-1][cx] + img[f][cy-1][cx+1]);
          b = 0;
          for (int dy = -2; dy <= 2; dy++)
            for (int dx = -2; dx <= 2; dx++)
              if (dy != 0 || dx != 0) begin
                cen[b] = img[f][cy+dy][cx+dx] < img[f][cy][cx];
                b++;
              end
          checks += 7;
          if (int'(out_desc.intensity) != img[f][cy][cx]) failures++;
          if (int'(out_desc.sobel_h_left) != gl) failures++;
          if (int'(out_desc.sobel_h_right) != gr) failures++;
          if (int'(out_desc.sobel_v) != gv) failures++;
          if (out_desc.census != cen) failures++;
          if (int'(out_x) != cx) failures++;
          if (int'(out_y) != cy) failures++;
        end else begin
          // border windows: only the reported centre position is defined,
          // each coordinate wrapped within the frame
          checks += 2;
          if (int'(out_x) != (nx + W - 2) % W) failures++;
          if (int'(out_y) != (ny + H - 2) % H) failures++;
        end
        nout++;
      end
    end
  end

  initial begin
    foreach (img[f, y, x]) img[f][y][x] = $urandom_range(0, 255);
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout >= W*H);
    checks++;
    if (t_out0 - t_in0 != 4) begin failures++; $display("latency %0d", t_out0 - t_in0); end
    stall = 1;
    wait (nout >= 2*W*H);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
