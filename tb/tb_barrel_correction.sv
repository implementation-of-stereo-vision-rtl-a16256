// tb_barrel_correction: random coordinates through several random sets of
// radial-distortion coefficients; results are compared with a real-valued
// evaluation of the second-order model (within 2/16 pixel), with random
// output stalls, and the stall-free latency must be 9 cycles.
module tb_barrel_correction;
  import stereo_pkg::*;
  localparam int K_W = 24;
  logic clk = 0, rst_n = 0;
  coord_t x_center, y_center;
  logic [19:0] inv_alpha_x, inv_alpha_y;
  logic signed [K_W-1:0] k1, k2;
  coord_pair_t in_c, out_c;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  coord_pair_t q_in [$];
  longint q_t [$];
  longint cyc = 0;
  bit stall = 0;
  int sent = 0, got = 0;
  localparam int NB = 300;

  barrel_correction #(.K_W(K_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
        real dx, dy, r, s, ex, ey;
        c = q_in.pop_front();
        t0 = q_t.pop_front();
        if (!stall && got == 0) begin
          checks++;
          if (cyc - t0 != 10) begin failures++; $display("latency %0d", cyc - t0); end
        end
        dx = real'(c.x - x_center) / 16.0;
        dy = real'(c.y - y_center) / 16.0;
        r  = (dx * real'(inv_alpha_x) / 2.0**20) ** 2 + (dy * real'(inv_alpha_y) / 2.0**20) ** 2;
        s  = 1.0 + real'(k1) / 2.0**16 * r + real'(k2) / 2.0**16 * r * r;
        ex = (dx * s) * 16.0 + real'(x_center);
        ey = (dy * s) * 16.0 + real'(y_center);
        if (ex > 32767.0) ex = 32767.0; if (ex < -32768.0) ex = -32768.0;
        if (ey > 32767.0) ey = 32767.0; if (ey < -32768.0) ey = -32768.0;
        checks += 2;
        if (real'(out_c.x) - ex > 2.0 || ex - real'(out_c.x) > 2.0) begin
          failures++; $display("x got %0d exp %f", out_c.x, ex);
        end
        if (real'(out_c.y) - ey > 2.0 || ey - real'(out_c.y) > 2.0) begin
          failures++; $display("y got %0d exp %f", out_c.y, ey);
        end
        got <= got + 1;
      end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0;
    x_center = coord_t'(640*16); y_center = coord_t'(480*16);
    inv_alpha_x = 20'd1311; inv_alpha_y = 20'd1311;   // alpha = 800
    k1 = K_W'(-13107); k2 = K_W'(3277);                // -0.2, 0.05
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      wait (got == sent && sent == NB);
      @(posedge clk);
      x_center = coord_t'($urandom_range(500*16, 780*16));
      y_center = coord_t'($urandom_range(380*16, 580*16));
      inv_alpha_x = 20'($urandom_range(1000, 2000));
      inv_alpha_y = 20'($urandom_range(1000, 2000));
      k1 = K_W'($urandom_range(0, 40000)) - K_W'(20000);
      k2 = K_W'($urandom_range(0, 20000)) - K_W'(10000);
      stall = (k % 2 == 0);
      sent = 0; got = 0;
    end
    wait (got == sent && sent == NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
