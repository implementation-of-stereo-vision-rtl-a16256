// tb_memory_matrix: writes a 40x12 image through the demultiplexed write port
// (pixel (x, y) to memory (y mod 4, x mod 4) at (y/4)*10 + x/4), then reads
// random 4x4 neighbourhoods with per-memory addresses and checks every word
// against the image one cycle after the read.
module tb_memory_matrix;
  localparam int NX = 4, NY = 4, DEPTH = 128, P = 8, W = 40, H = 12;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [1:0] wr_col, wr_row;
  logic [6:0] wr_addr;
  logic [P-1:0] wr_data;
  logic [6:0] rd_addr [NY][NX];
  logic [P-1:0] rd_data [NY][NX];
  logic [P-1:0] img [H][W];
  int checks = 0, failures = 0;

  memory_matrix #(.NX(NX), .NY(NY), .DEPTH(DEPTH), .PIX_W(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [NY][NX];
    foreach (img[y, x]) img[y][x] = P'($urandom);
    wr_en = 0; rd_en = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        wr_en = 1; wr_col = 2'(x % 4); wr_row = 2'(y % 4);
        wr_addr = 7'((y / 4) * (W / 4) + x / 4); wr_data = img[y][x];
      end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int x0, y0;
      x0 = $urandom_range(1, W - 3); y0 = $urandom_range(1, H - 3);
      @(negedge clk);
      rd_en = 1;
      for (int j = y0 - 1; j <= y0 + 2; j++)
        for (int k = x0 - 1; k <= x0 + 2; k++) begin
          rd_addr[j % 4][k % 4] = 7'((j / 4) * (W / 4) + k / 4);
          ex[j % 4][k % 4] = int'(img[j][k]);
        end
      @(negedge clk);
      rd_en = 0;
      foreach (ex[r, c]) begin
        checks++;
        if (int'(rd_data[r][c]) != ex[r][c]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
