// tb_corr_search: random energy vectors for 128 candidates (with forced ties
// and a narrow value range so that ties are common) under a random enable;
// the result, log2(128) = 7 enabled cycles later, must be the least energy and
// the lowest index holding it.
module tb_corr_search;
  localparam int N = 128, EW = 14, IW = 7;
  logic clk = 0, ce = 0;
  logic [EW-1:0] energy [N];
  logic [IW-1:0] index [N];
  logic [EW-1:0] min_energy;
  logic [IW-1:0] min_index;
  int checks = 0, failures = 0, n = 0;
  int qe [$], qi [$];

  corr_search #(.N(N), .EW(EW), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (ce) begin
      int be, bi;
      be = 1 << EW; bi = 0;
      for (int i = 0; i < N; i++) if (int'(energy[i]) < be) begin be = energy[i]; bi = i; end
      qe.push_back(be); qi.push_back(bi);
      if (qe.size() > 7) begin
        checks += 2;
        if (int'(min_energy) != qe.pop_front()) failures++;
        if (int'(min_index) != qi.pop_front()) failures++;
        n++;
      end
      for (int i = 0; i < N; i++)
        energy[i] <= (n % 3 == 0) ? EW'($urandom_range(5, 12)) : EW'($urandom);
    end
    ce <= $urandom_range(0, 3) != 0;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      index[i]  = IW'(i);
      energy[i] = '0;
    end
    wait (n >= 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
