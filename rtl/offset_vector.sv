// offset_vector: per-memory address offsets for N-sample parallel access.
//
// Samples of one dimension are spread over N memories (sample i lives in
// memory i mod N at address i / N). To read the N consecutive samples
// i0 - N/2 + 1 .. i0 + N/2 around the integer request i0 = rh*N + rl in one
// cycle, memory m must be read at rh + o[m], with o[m] in {-1, 0, +1}.
// The offsets are a window of N entries taken from the static vector
//   V = [ +1 (N/2 times), 0 (N times), -1 (N/2-1 times) ]
// starting at N-1-rl: o[m] = V[m - rl + N - 1]. All N possible slices are
// formed by wiring and the low request bits rl select one through a
// multiplexer, as in the original offset-vector circuit. Combinational.
// N must be a power of two, at least 2.
module offset_vector #(
  parameter int N = 4
) (
  input  logic [$clog2(N)-1:0] rl,
  output logic signed [1:0]    offs [N]
);

  function automatic logic signed [1:0] vec(input int j);
    if (j < N/2)       return 2'sd1;
    else if (j < 3*N/2) return 2'sd0;
    else               return -2'sd1;
  endfunction

  logic signed [1:0] slices [N][N];   // [rl value][memory]
  always_comb begin
    for (int v = 0; v < N; v++)
      for (int m = 0; m < N; m++)
        slices[v][m] = vec(m - v + N - 1);
    offs = slices[rl];
  end
endmodule
