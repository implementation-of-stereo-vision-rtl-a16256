// tb_read_access_gen: random 2-D requests for a 4x4 memory matrix with a
// 320-word block-row pitch; for every memory the address must be that of the
// window pixel it holds, ((y / 4) * 320 + x / 4) mod 8192, with the window
// rows yi-1..yi+2 and columns xi-1..xi+2 found here by search. The low bits
// come out aligned with the addresses, two enabled cycles after the request;
// ce is toggled at random.
module tb_read_access_gen;
  localparam int NX = 4, NY = 4, AW = 13, C2 = 320;
  logic clk = 0, ce = 0;
  logic [AW-1:0] c2 = AW'(C2);
  logic [11:0] xi, yi;
  logic [AW-1:0] addr [NY][NX];
  logic [1:0] xl_out, yl_out;
  int checks = 0, failures = 0;
  int qx [$], qy [$];

  read_access_gen #(.NX(NX), .NY(NY), .AW(AW), .XW(12), .YW(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n = 0;
  always @(posedge clk) begin
    if (ce) begin
      // the request presented in this enabled cycle
      qx.push_back(int'(xi)); qy.push_back(int'(yi));
      if (qx.size() > 2) begin
        int x0, y0;
        x0 = qx.pop_front(); y0 = qy.pop_front();
        // outputs now reflect the request two enabled cycles back
        for (int r = 0; r < NY; r++)
          for (int c = 0; c < NX; c++) begin
            int wy, wx, ea;
            wy = -1; wx = -1;
            for (int j = y0 - 1; j <= y0 + 2; j++) if (((j % 4) + 4) % 4 == r) wy = j;
            for (int k = x0 - 1; k <= x0 + 2; k++) if (((k % 4) + 4) % 4 == c) wx = k;
            ea = ((((wy >>> 2) * C2 + (wx >>> 2)) % 8192) + 8192) % 8192;
            checks++;
            if (int'(addr[r][c]) != ea) failures++;
          end
        checks += 2;
        if (int'(xl_out) != x0 % 4 || int'(yl_out) != y0 % 4) failures++;
        n++;
      end
    end
    ce <= $urandom_range(0, 3) != 0;
    if (ce) begin
      xi <= 12'($urandom_range(0, 1279));
      yi <= 12'($urandom_range(0, 959));
    end
  end

  initial begin
    xi = 0; yi = 0;
    wait (n >= 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
