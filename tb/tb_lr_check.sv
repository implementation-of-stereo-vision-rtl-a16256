// tb_lr_check: D = 8 on 16-pixel rows. Left and right disparity streams are
// generated with the alignment that correspondence produces (left result for
// pixel n together with the right result for pixel n - D + 1). Right values
// are mostly close to the matching left value so that accepted and rejected
// cases both occur. Each output is compared with a direct evaluation of the
// consistency rule |dR(x - dL) - dL| <= 1 on the same row; the latency is
// checked as D - 1 inputs plus one register.
module tb_lr_check;
  localparam int D = 8, W = 16, NIN = 600;
  logic clk = 0, rst_n = 0;
  logic [2:0] disp_l, disp_r, out_disp;
  logic [3:0] x_l, x_r, out_x;
  logic r_ok, in_valid, in_ready, out_ok, out_valid, out_ready;
  int checks = 0, failures = 0, n_acc = 0, n_rej = 0;
  int DL [NIN], DR [NIN], X [NIN];
  int idx = 0, nout = 0;
  bit stall = 0;
  longint t_in [NIN];

  lr_check #(.D(D), .IMG_W(W), .THRESH(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        if (idx < NIN && (!stall || $urandom_range(0, 3) != 0)) begin
          int p;
          p = idx - (D - 1);
          disp_l <= 3'(DL[idx]); x_l <= 4'(X[idx]);
          disp_r <= 3'(p >= 0 ? DR[p] : 0); x_r <= 4'(p >= 0 ? X[p] : 0);
          r_ok <= p >= 0;
          in_valid <= 1; t_in[idx] <= $time / 10; idx <= idx + 1;
        end else in_valid <= 0;
      end
      out_ready <= !stall || ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        int q, xr;
        bit exp_ok;
        q = nout - (D - 1);
        // stall-free: the result for input n appears one register later
        if (!stall) begin
          checks++;
          if ($time / 10 - t_in[nout] != 2) failures++;
        end
        exp_ok = 0;
        if (q >= 0) begin
          xr = X[q] - DL[q];
          exp_ok = xr >= 0 && (DR[q - DL[q]] - DL[q] <= 1) && (DL[q] - DR[q - DL[q]] <= 1);
          checks += 2;
          if (int'(out_disp) != DL[q]) failures++;
          if (int'(out_x) != X[q]) failures++;
        end
        checks++;
        if (out_ok != exp_ok) failures++;
        if (exp_ok) n_acc++; else if (q >= 0) n_rej++;
        nout++;
      end
    end
  end

  initial begin
    for (int i = 0; i < NIN; i++) begin
      X[i] = i % W;
      DL[i] = $urandom_range(0, D - 1);
    end
    // right disparities: mostly consistent with the left pixel that maps there
    for (int i = 0; i < NIN; i++) DR[i] = $urandom_range(0, D - 1);
    for (int i = 0; i < NIN; i++)
      if (X[i] - DL[i] >= 0 && $urandom_range(0, 2) != 0)
        DR[i - DL[i]] = DL[i] + ($urandom_range(0, 1) == 1 && DL[i] < D - 1 ? 1 : 0);
    in_valid = 0; out_ready = 0; r_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout >= NIN / 2);
    stall = 1;
    wait (nout >= NIN - D);
    checks++;
    if (n_acc < 50 || n_rej < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
