// tb_feature_comparator: random descriptor pairs (and identical pairs, which
// must give zero energy); the energy must equal the sum of the absolute
// intensity and Sobel differences plus the census Hamming distance.
module tb_feature_comparator;
  import stereo_pkg::*;
  descriptor_t a, b;
  energy_t energy;
  int checks = 0, failures = 0;

  feature_comparator dut (.*);

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic descriptor_t rnd();
    descriptor_t d;
    d.intensity     = pixel_t'($urandom);
    d.sobel_h_left  = sobel_t'($urandom_range(0, 2040)) - sobel_t'(1020);
    d.sobel_h_right = sobel_t'($urandom_range(0, 2040)) - sobel_t'(1020);
    d.sobel_v       = sobel_t'($urandom_range(0, 2040)) - sobel_t'(1020);
    d.census        = 24'($urandom);
    return d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e;
      a = rnd();
      b = (t % 10 == 0) ? a : rnd();
      #1;
      e = iabs(int'(a.intensity) - int'(b.intensity))
        + iabs(int'(a.sobel_h_left) - int'(b.sobel_h_left))
        + iabs(int'(a.sobel_h_right) - int'(b.sobel_h_right))
        + iabs(int'(a.sobel_v) - int'(b.sobel_v))
        + $countones(a.census ^ b.census);
      checks++;
      if (int'(energy) != e) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
