// tb_sliding_window: streams two 9x6 frames with random input gaps and
// output stalls, and compares every window whose pixels all lie in the frame
// with the stored image.
module tb_sliding_window;
  localparam int K = 3, W = 9, H = 6, P = 8;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] in_pix;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [P-1:0] out_win [K][K];
  logic [$clog2(W)-1:0] out_x;
  logic [$clog2(H)-1:0] out_y;
  int checks = 0, failures = 0, nout = 0;
  logic [P-1:0] img [2][H][W];
  int frame_o = 0;

  sliding_window #(.K(K), .IMG_W(W), .IMG_H(H), .PIX_W(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer: raster order, random gaps (race-free, sampled on the edge)
  int idx = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        if (idx < 2*W*H && $urandom_range(0, 3) != 0) begin
          in_pix   <= img[idx/(W*H)][(idx%(W*H))/W][idx%W];
          in_valid <= 1;
          idx      <= idx + 1;
        end else
          in_valid <= 0;
      end
      out_ready <= ($urandom_range(0, 3) != 0);
    end
  end

  // consumer: checks
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_x >= K-1 && out_y >= K-1) begin
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) begin
            checks++;
            if (out_win[r][c] !== img[frame_o][out_y-(K-1)+r][out_x-(K-1)+c]) failures++;
          end
      end
      checks++;
      if (int'(out_x) != nout % W || int'(out_y) != (nout / W) % H) failures++;
      nout++;
      if (nout % (W*H) == 0) frame_o++;
    end
  end

  initial begin
    foreach (img[f, y, x]) img[f][y][x] = P'($urandom);
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout >= 2*W*H || $time < 0);
    checks++;
    if (nout != 2*W*H) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
