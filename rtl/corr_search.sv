// corr_search: pipelined search for the least-energy correspondence.
//
// Takes N (energy, index) pairs and returns the pair with the smallest
// energy; the index is the disparity of that candidate. The search is the
// recursive halving circuit (split the candidates in two halves, find each
// half's winner, compare the two winners) written out level by level: level
// l holds N/2^l winners, each the better of two neighbours of level l-1.
// On equal energies the lower index wins. Every level is registered, so the
// latency is log2(N) cycles, advancing on ce. N must be a power of two.
module corr_search #(
  parameter int N   = 128,
  parameter int EW  = 14,
  parameter int IW  = 7
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [EW-1:0] energy [N],
  input  logic [IW-1:0] index  [N],
  output logic [EW-1:0] min_energy,
  output logic [IW-1:0] min_index
);
  localparam int LV = $clog2(N);

  logic [EW-1:0] e [LV+1][N];
  logic [IW-1:0] ix [LV+1][N];

  always_comb begin
    e[0]  = energy;
    ix[0] = index;
  end

  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    for (genvar k = 0; k < (N >> l); k++) begin : g_node
      always_ff @(posedge clk) begin
        if (ce) begin
          if (e[l-1][2*k+1] < e[l-1][2*k]) begin
            e[l][k]  <= e[l-1][2*k+1];
            ix[l][k] <= ix[l-1][2*k+1];
          end else begin
            e[l][k]  <= e[l-1][2*k];
            ix[l][k] <= ix[l-1][2*k];
          end
        end
      end
    end
  end

  assign min_energy = e[LV][0];
  assign min_index  = ix[LV][0];
endmodule
