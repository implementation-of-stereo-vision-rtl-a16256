// tb_demosaic: random Bayer frames (G R / B G) with random gaps and stalls.
// Every output whose 3x3 window lies inside the frame is compared with a
// bilinear reference computed here from the mosaic, including the lightness
// grayscale value. The latency from an accepted pixel to its window-centre
// output (5 cycles without stalls) is checked in a separate run-in phase.
module tb_demosaic;
  import stereo_pkg::*;
  localparam int W = 10, H = 6;
  logic clk = 0, rst_n = 0;
  pixel_t in_pix, out_r, out_g, out_b, out_gray;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;
  int checks = 0, failures = 0, nout = 0, idx = 0;
  pixel_t img [2][H][W];
  bit stall_mode = 0;
  longint cyc = 0, t_in0 = -1, t_out0 = -1;

  demosaic #(.IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int colour(int x, int y);  // 0 R, 1 G, 2 B
    if (y % 2 == 0) return (x % 2 == 0) ? 1 : 0;
    else            return (x % 2 == 0) ? 2 : 1;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        if (idx < 2*W*H && (!stall_mode || $urandom_range(0, 3) != 0)) begin
          in_pix   <= img[idx/(W*H)][(idx%(W*H))/W][idx%W];
          in_valid <= 1;
          if (idx == 0) t_in0 <= $time / 10;
          idx      <= idx + 1;
        end else
          in_valid <= 0;
      end
      out_ready <= !stall_mode || ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int f, nx, ny, cx, cy, rr, gg, bb, mx, mn;
      f  = nout / (W*H);
      nx = nout % W; ny = (nout / W) % H;
      if (nout == 0) t_out0 = $time / 10;
      if (nx >= 2 && ny >= 2) begin
        cx = nx - 1; cy = ny - 1;
        case (colour(cx, cy))
          1: begin
            gg = img[f][cy][cx];
            if (cy % 2 == 0) begin
              rr = (img[f][cy][cx-1] + img[f][cy][cx+1]) / 2;
              bb = (img[f][cy-1][cx] + img[f][cy+1][cx]) / 2;
            end else begin
              bb = (img[f][cy][cx-1] + img[f][cy][cx+1]) / 2;
              rr = (img[f][cy-1][cx] + img[f][cy+1][cx]) / 2;
            end
          end
          0: begin
            rr = img[f][cy][cx];
            gg = (img[f][cy-1][cx] + img[f][cy+1][cx] + img[f][cy][cx-1] + img[f][cy][cx+1]) / 4;
            bb = (img[f][cy-1][cx-1] + img[f][cy-1][cx+1] + img[f][cy+1][cx-1] + img[f][cy+1][cx+1]) / 4;
          end
          default: begin
            bb = img[f][cy][cx];
            gg = (img[f][cy-1][cx] + img[f][cy+1][cx] + img[f][cy][cx-1] + img[f][cy][cx+1]) / 4;
            rr = (img[f][cy-1][cx-1] + img[f][cy-1][cx+1] + img[f][cy+1][cx-1] + img[f][cy+1][cx+1]) / 4;
          end
        endcase
        mx = rr > gg ? rr : gg; mx = bb > mx ? bb : mx;
        mn = rr < gg ? rr : gg; mn = bb < mn ? bb : mn;
        checks += 6;
        if (out_r != rr) failures++;
        if (out_g != gg) failures++;
        if (out_b != bb) failures++;
        if (out_gray != (mx + mn) / 2) failures++;
        if (int'(out_x) != cx) failures++;
        if (int'(out_y) != cy) failures++;
      end else begin
        // border windows: only the centre position is defined, each
        // coordinate wrapped within the frame
        checks += 2;
        if (int'(out_x) != (nx + W - 1) % W) failures++;
        if (int'(out_y) != (ny + H - 1) % H) failures++;
      end
      nout++;
    end
  end

  initial begin
    foreach (img[f, y, x]) img[f][y][x] = pixel_t'($urandom);
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout >= W*H);
    checks++;
    if (t_out0 - t_in0 != 6) begin
      failures++;
      $display("latency %0d", t_out0 - t_in0);
    end
    stall_mode = 1;
    wait (nout >= 2*W*H);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
