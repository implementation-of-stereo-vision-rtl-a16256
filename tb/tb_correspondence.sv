// tb_correspondence: D = 8 candidates on 16-pixel rows. Random descriptor
// pairs stream in with gaps and output stalls; for every input the left-to-
// right and right-to-left results are compared with a brute-force search
// written here (same row only, lowest disparity wins ties). Some rows carry a
// right image that is the left image shifted by 3 pixels, so the expected
// disparity 3 must be found there. The stall-free latency is 2 + log2(D).
module tb_correspondence;
  import stereo_pkg::*;
  localparam int D = 8, W = 16, NIN = 400;
  logic clk = 0, rst_n = 0;
  descriptor_t in_left, in_right;
  logic [$clog2(W)-1:0] in_x, x_l, x_r;
  logic in_valid, in_ready, out_valid, out_ready, r_ok;
  logic [$clog2(D)-1:0] disp_l, disp_r;
  energy_t energy_l, energy_r;
  int checks = 0, failures = 0, n_shift_hits = 0;
  descriptor_t L [NIN], R [NIN];
  int X [NIN];
  int idx = 0, nout = 0;
  bit stall = 0;
  longint t_in [NIN];

  correspondence #(.D(D), .IMG_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction
  function automatic int en(descriptor_t a, descriptor_t b);
    return iabs(int'(a.intensity) - int'(b.intensity))
         + iabs(int'(a.sobel_h_left) - int'(b.sobel_h_left))
         + iabs(int'(a.sobel_h_right) - int'(b.sobel_h_right))
         + iabs(int'(a.sobel_v) - int'(b.sobel_v))
         + $countones(a.census ^ b.census);
  endfunction

  function automatic descriptor_t rnd();
    descriptor_t d;
    d.intensity     = pixel_t'($urandom);
    d.sobel_h_left  = sobel_t'($urandom_range(0, 200)) - sobel_t'(100);
    d.sobel_h_right = sobel_t'($urandom_range(0, 200)) - sobel_t'(100);
    d.sobel_v       = sobel_t'($urandom_range(0, 200)) - sobel_t'(100);
    d.census        = 24'($urandom);
    return d;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        if (idx < NIN && (!stall || $urandom_range(0, 3) != 0)) begin
          in_left <= L[idx]; in_right <= R[idx]; in_x <= 4'(X[idx]);
          in_valid <= 1; t_in[idx] <= $time / 10; idx <= idx + 1;
        end else in_valid <= 0;
      end
      out_ready <= !stall || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int n, be, bd, p;
        n = nout;
        if (!stall && n < 20) begin
          checks++;
          if ($time / 10 - t_in[n] != 1 + 2 + $clog2(D)) failures++;
        end
        // left to right
        be = 1 << 30; bd = 0;
        for (int d = 0; d < D; d++)
          if (n - d >= 0 && X[n] - d >= 0 && en(L[n], R[n-d]) < be) begin
            be = en(L[n], R[n-d]); bd = d;
          end
        checks += 3;
        if (int'(disp_l) != bd) failures++;
        if (int'(energy_l) != be) failures++;
        if (int'(x_l) != X[n]) failures++;
        if ((n / W) % 2 == 1 && X[n] >= D && bd == 3) n_shift_hits++;
        // right to left
        p = n - (D - 1);
        checks++;
        if (r_ok != (p >= 0)) failures++;
        if (p >= 0) begin
          be = 1 << 30; bd = 0;
          for (int d = 0; d < D; d++)
            if (X[p] + d < W && en(R[p], L[p+d]) < be) begin
              be = en(R[p], L[p+d]); bd = d;
            end
          checks += 3;
          if (int'(disp_r) != bd) failures++;
          if (int'(energy_r) != be) failures++;
          if (int'(x_r) != X[p]) failures++;
        end
        nout++;
      end
    end
  end

  initial begin
    for (int i = 0; i < NIN; i++) begin
      X[i] = i % W;
      L[i] = rnd();
      R[i] = rnd();
    end
    // odd rows: right(x) = left(x + 3), i.e. disparity 3
    for (int i = 0; i < NIN; i++)
      if ((i / W) % 2 == 1 && X[i] + 3 < W) R[i] = L[i + 3];
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout >= NIN / 2);
    stall = 1;
    wait (nout >= NIN);
    checks++;
    if (n_shift_hits < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
