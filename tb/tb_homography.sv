// tb_homography: several random near-identity perspective matrices and a
// matrix giving w <= 0; each mapped coordinate is compared with a real-valued
// reference (within 2/16 pixel), points without an image must come out at the
// most negative coordinate, results must stay in order under random output
// stalls, and the stall-free latency must be 9 cycles. The identity and an
// integer translation must map every position exactly.
module tb_homography;
  import stereo_pkg::*;
  localparam int H_W = 32, H_FRAC = 20;
  logic clk = 0, rst_n = 0;
  logic signed [H_W-1:0] h [9];
  coord_pair_t in_c, out_c;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  coord_pair_t q_in [$];
  longint q_t [$];
  longint cyc = 0;
  bit stall = 0;
  bit exact = 1;
  int sent = 0, got = 0, n_bad = 0;

  homography #(.H_W(H_W), .H_FRAC(H_FRAC), .ITER(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real hr(int i);
    return real'(h[i]) / 2.0**H_FRAC;
  endfunction

  localparam int NB = 300;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        if (sent < NB) begin
          coord_pair_t c;
          c.x = coord_t'($urandom_range(0, 1279*16));
          c.y = coord_t'($urandom_range(0, 959*16));
          in_c <= c; in_valid <= 1; sent <= sent + 1;
          q_in.push_back(c); q_t.push_back(cyc);
        end else in_valid <= 0;
      end
      out_ready <= !stall || $urandom_range(0, 2) != 0;
      if (out_valid && out_ready) begin
        coord_pair_t c;
        longint t0;
        real x, y, xw, yw, ww, ex, ey;
        c = q_in.pop_front();
        t0 = q_t.pop_front();
        if (!stall && got == 0) begin
          checks++;
          if (cyc - t0 != 10) begin failures++; $display("latency %0d", cyc - t0); end
        end
        x = real'(c.x) / 16.0; y = real'(c.y) / 16.0;
        xw = hr(0)*x + hr(1)*y + hr(2);
        yw = hr(3)*x + hr(4)*y + hr(5);
        ww = hr(6)*x + hr(7)*y + hr(8);
        checks += 2;
        if (ww <= 0.0) begin
          n_bad++;
          if (out_c.x != coord_t'(16'h8000) || out_c.y != coord_t'(16'h8000)) failures++;
        end else begin
          ex = xw / ww * 16.0; ey = yw / ww * 16.0;
          if (ex > 32767.0) ex = 32767.0; if (ex < -32768.0) ex = -32768.0;
          if (ey > 32767.0) ey = 32767.0; if (ey < -32768.0) ey = -32768.0;
          if (real'(out_c.x) - ex > 2.0 || ex - real'(out_c.x) > 2.0) begin
            failures++; $display("x got %0d exp %f", out_c.x, ex);
          end
          if (real'(out_c.y) - ey > 2.0 || ey - real'(out_c.y) > 2.0) begin
            failures++; $display("y got %0d exp %f", out_c.y, ey);
          end
          if (exact) begin
            // identity / integer translation: exact result required
            checks++;
            if (out_c.x != coord_t'($rtoi(ex)) || out_c.y != coord_t'($rtoi(ey))) failures++;
          end
        end
        got <= got + 1;
      end
    end
  end

  task automatic set_h(real m [9]);
    for (int i = 0; i < 9; i++) h[i] = H_W'($rtoi(m[i] * 2.0**H_FRAC));
  endtask

  initial begin
    real m [9];
    in_valid = 0; out_ready = 0;
    m = '{1.0, 0.0, 0.0, 0.0, 1.0, 0.0, 0.0, 0.0, 1.0};
    set_h(m);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      wait (got == sent && sent == NB);
      @(posedge clk);
      exact = 0;
      if (k == 1) begin
        // integer translation
        m = '{1.0, 0.0, 7.0, 0.0, 1.0, -5.0, 0.0, 0.0, 1.0};
        exact = 1;
      end else if (k == 4) begin
        // w crosses zero inside the frame
        m = '{1.0, 0.0, 0.0, 0.0, 1.0, 0.0, -0.002, 0.0, 1.5};
      end else begin
        for (int i = 0; i < 9; i++) m[i] = 0.0;
        m[0] = 0.9 + real'($urandom_range(0, 200)) / 1000.0;
        m[4] = 0.9 + real'($urandom_range(0, 200)) / 1000.0;
        m[1] = real'($urandom_range(0, 100)) / 1000.0 - 0.05;
        m[3] = real'($urandom_range(0, 100)) / 1000.0 - 0.05;
        m[2] = real'($urandom_range(0, 4000)) / 100.0 - 20.0;
        m[5] = real'($urandom_range(0, 4000)) / 100.0 - 20.0;
        m[6] = real'($urandom_range(0, 200)) * 1.0e-6 - 1.0e-4;
        m[7] = real'($urandom_range(0, 200)) * 1.0e-6 - 1.0e-4;
        m[8] = 0.8 + real'($urandom_range(0, 400)) / 1000.0;
      end
      set_h(m);
      stall = (k % 2 == 1);
      sent = 0; got = 0;
    end
    wait (got == sent && sent == NB);
    checks++;
    if (n_bad == 0) failures++;   // the w <= 0 case was exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
