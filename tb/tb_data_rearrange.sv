// tb_data_rearrange: for all low-bit combinations and random memory data,
// window element (j, k) must be the data of memory ((yl-1+j) mod 4,
// (xl-1+k) mod 4). Also checks the published 1-D ordering for xl = 0:
// data points 0..3 come from memories 3, 0, 1, 2.
module tb_data_rearrange;
  localparam int NX = 4, NY = 4, P = 8;
  logic [P-1:0] mem_data [NY][NX];
  logic [1:0] xl, yl;
  logic [P-1:0] win [NY][NX];
  int checks = 0, failures = 0;

  data_rearrange #(.NX(NX), .NY(NY), .PIX_W(P)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          foreach (mem_data[r, c]) mem_data[r][c] = P'($urandom);
          yl = 2'(a); xl = 2'(b);
          #1;
          for (int j = 0; j < NY; j++)
            for (int k = 0; k < NX; k++) begin
              checks++;
              if (win[j][k] !== mem_data[(a + 3 + j) % 4][(b + 3 + k) % 4]) failures++;
            end
        end
    foreach (mem_data[r, c]) mem_data[r][c] = P'(16 * r + c);
    yl = 2'd1; xl = 2'd0; #1;
    checks += 4;
    if (win[0][0] != 8'h03) failures++;
    if (win[0][1] != 8'h00) failures++;
    if (win[0][2] != 8'h01) failures++;
    if (win[0][3] != 8'h02) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
