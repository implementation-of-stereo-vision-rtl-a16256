// tb_offset_vector: exhaustive check for N = 2, 4, 8 and 16. For every low
// request value the offset of each memory must place the sample it returns
// inside the window i0 - N/2 + 1 .. i0 + N/2 of the request i0, worked out
// here by search over the three possible offsets.
module tb_offset_vector;
  int checks = 0, failures = 0;

  logic [0:0] rl2;  logic signed [1:0] o2 [2];
  logic [1:0] rl4;  logic signed [1:0] o4 [4];
  logic [2:0] rl8;  logic signed [1:0] o8 [8];
  logic [3:0] rl16; logic signed [1:0] o16 [16];
  offset_vector #(.N(2))  u2  (.rl(rl2),  .offs(o2));
  offset_vector #(.N(4))  u4  (.rl(rl4),  .offs(o4));
  offset_vector #(.N(8))  u8  (.rl(rl8),  .offs(o8));
  offset_vector #(.N(16)) u16 (.rl(rl16), .offs(o16));

  function automatic int expected(int n, int rl, int m);
    for (int o = -1; o <= 1; o++) begin
      int rel;
      rel = m + n*o - rl;           // sample offset relative to i0
      if (rel >= -n/2 + 1 && rel <= n/2) return o;
    end
    return 99;
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      rl2 = 1'(r); rl4 = 2'(r); rl8 = 3'(r); rl16 = 4'(r);
      #1;
      if (r < 2) for (int m = 0; m < 2; m++) begin checks++; if (int'(o2[m]) != expected(2, r, m)) failures++; end
      if (r < 4) for (int m = 0; m < 4; m++) begin checks++; if (int'(o4[m]) != expected(4, r, m)) failures++; end
      if (r < 8) for (int m = 0; m < 8; m++) begin checks++; if (int'(o8[m]) != expected(8, r, m)) failures++; end
      for (int m = 0; m < 16; m++) begin checks++; if (int'(o16[m]) != expected(16, r, m)) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
