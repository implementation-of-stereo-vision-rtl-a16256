// tb_goldschmidt_div: random divisors over many binades plus edge values;
// the reciprocal is compared with a real-valued reference (relative error
// below 2^-13 plus one LSB), d = 0 must saturate and flag, and the latency
// must be ITER + 2 cycles.
module tb_goldschmidt_div;
  localparam int ITER = 4;
  logic clk = 0, rst_n = 0, ce;
  logic [31:0] in_d, out_recip;
  logic in_valid, out_zero, out_valid;
  int checks = 0, failures = 0;
  logic [31:0] q_d [$];
  longint cyc = 0;
  longint q_t [$];

  goldschmidt_div #(.D_W(32), .D_FRAC(24), .R_W(32), .R_FRAC(24), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, got = 0;
  localparam int NT = 600;
  logic [31:0] stim [NT];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      ce <= ($urandom_range(0, 4) != 0);
      if (ce) begin
        if (sent < NT) begin
          in_d <= stim[sent]; in_valid <= 1;
          q_d.push_back(stim[sent]); q_t.push_back(cyc);
          sent <= sent + 1;
        end else in_valid <= 0;
      end
      if (ce && out_valid) begin
        logic [31:0] d;
        real exp_r, got_r;
        d = q_d.pop_front();
        void'(q_t.pop_front());
        checks++;
        if (d == 0) begin
          if (!out_zero || out_recip != '1) failures++;
        end else begin
          exp_r = (2.0**48) / real'(d);
          got_r = real'(out_recip);
          if (exp_r >= 2.0**32) begin
            if (out_recip != '1) failures++;
          end else if ((got_r - exp_r > exp_r * 2.0**-13 + 1.0) ||
                       (exp_r - got_r > exp_r * 2.0**-13 + 1.0)) begin
            failures++;
            $display("d=%h got %f exp %f", d, got_r, exp_r);
          end
        end
        got <= got + 1;
      end
    end
  end

  initial begin
    for (int i = 0; i < NT; i++) begin
      int sh;
      sh = $urandom_range(0, 31);
      stim[i] = ($urandom | 32'h1) >> sh;
    end
    stim[0] = 32'h0100_0000;   // 1.0
    stim[1] = 32'h0080_0000;   // 0.5
    stim[2] = 0;
    stim[3] = 32'hFFFF_FFFF;
    stim[4] = 32'h0000_0100;   // small: saturates
    in_valid = 0; ce = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == NT);
    // latency: one value with ce held high
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency check: output valid appears ITER+2 enabled cycles after input
  int en_cnt = 0;
  bit lat_done = 0;
  always @(posedge clk) begin
    if (rst_n && !lat_done) begin
      if (ce) en_cnt <= en_cnt + 1;
      if (ce && out_valid) begin
        checks++;
        // first input was presented in the cycle after the first enabled edge
        if (en_cnt != ITER + 2 + 1) begin
          failures++;
          $display("latency %0d", en_cnt);
        end
        lat_done <= 1;
      end
    end
  end
endmodule
