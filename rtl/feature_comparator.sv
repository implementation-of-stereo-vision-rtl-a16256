// feature_comparator: dissimilarity ("energy") of two pixel descriptors.
//
// energy = |dI| + |dSobelH_left| + |dSobelH_right| + |dSobelV|
//          + popcount(census_a XOR census_b)
// i.e. magnitude comparisons of the intensity and the three Sobel values plus
// the Hamming distance of the census vectors. Lower energy means a more
// likely correspondence. Combinational; the caller registers the result.
// The terms follow the original comparison logic; giving every term weight
// one is this design's choice.
module feature_comparator
  import stereo_pkg::*;
(
  input  descriptor_t a,
  input  descriptor_t b,
  output energy_t     energy
);
  function automatic logic [SOBEL_W:0] absdiff_s(input sobel_t p, input sobel_t q);
    logic signed [SOBEL_W:0] d;
    d = (SOBEL_W+1)'(p) - (SOBEL_W+1)'(q);
    return (d < 0) ? -d : d;
  endfunction

  always_comb begin
    logic [CENSUS_W-1:0] x;
    logic [4:0] ham;
    logic [PIX_W-1:0] di;
    x   = a.census ^ b.census;
    ham = '0;
    for (int i = 0; i < CENSUS_W; i++) ham += 5'(x[i]);
    di  = (a.intensity > b.intensity) ? a.intensity - b.intensity
                                      : b.intensity - a.intensity;
    energy = ENERGY_W'(di)
           + ENERGY_W'(absdiff_s(a.sobel_h_left,  b.sobel_h_left))
           + ENERGY_W'(absdiff_s(a.sobel_h_right, b.sobel_h_right))
           + ENERGY_W'(absdiff_s(a.sobel_v,       b.sobel_v))
           + ENERGY_W'(ham);
  end
endmodule
