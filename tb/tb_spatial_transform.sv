// tb_spatial_transform: three 32x24 frames through a 4x4 memory matrix whose
// ring holds only 16 image rows. The testbench plays the external inverse
// transformation: it takes output coordinates, maps them with a per-frame
// function (a bowed, shifted scaling with out-of-frame areas; a zoom; a
// shift that needs rows far ahead) and returns them after a random delay.
// Every output pixel is compared with a reference computed from the stored
// input image (nearest neighbour for frames 0 and 2, bilinear for frame 1).
// Frame 0 runs without output stalls and checks the 4-cycle latency from
// accepted request to output pixel. The test also requires that request
// stalls, held-back input and outside requests each happened.
module tb_spatial_transform;
  import stereo_pkg::*;
  localparam int W = 32, H = 24, NX = 4, NY = 4, DEPTH = 32, NF = 3;
  logic clk = 0, rst_n = 0;
  recon_mode_e recon_mode;
  logic [7:0] back_rows;
  pixel_t in_pix, out_pix;
  logic in_valid, in_ready, oc_valid, oc_ready, rq_valid, rq_ready, out_valid, out_ready;
  coord_pair_t oc, rq;
  logic ev_wait, ev_full, ev_outside;
  int checks = 0, failures = 0;
  pixel_t img [NF][H][W];
  int n_wait = 0, n_full = 0, n_out = 0;
  longint cyc = 0;

  spatial_transform #(.IMG_W(W), .IMG_H(H), .NX(NX), .NY(NY), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coord_pair_t mapping(int f, int x, int y);
    coord_pair_t c;
    case (f)
      0: begin
        c.x = coord_t'(x * 12 + 40 + y * 2);
        c.y = coord_t'(y * 14 - 16 + ((x - 16) * (x - 16)) / 8);
      end
      1: begin
        c.x = coord_t'(x * 10 + 60 + 3);
        c.y = coord_t'(y * 11 + 20 + 5);
      end
      default: begin
        c.x = coord_t'(x * 16 - 24);
        c.y = coord_t'(y * 16 + 10 * 16);
      end
    endcase
    return c;
  endfunction

  function automatic int reference(int f, coord_pair_t c);
    int xi, yi, fx, fy, acc;
    xi = int'(c.x) >>> 4; yi = int'(c.y) >>> 4;
    fx = int'(c.x) & 15;  fy = int'(c.y) & 15;
    if (xi < 0 || xi > W - 2 || yi < 0 || yi > H - 2) return 0;
    if (f == 1) begin
      acc = img[f][yi][xi] * (16 - fx) * (16 - fy) + img[f][yi][xi+1] * fx * (16 - fy)
          + img[f][yi+1][xi] * (16 - fx) * fy + img[f][yi+1][xi+1] * fx * fy;
      return (acc + 128) >> 8;
    end
    return img[f][yi + (fy >= 8)][xi + (fx >= 8)];
  endfunction

  // input image producer
  int in_idx = 0;
  always @(posedge clk) begin
    if (rst_n && (!in_valid || in_ready)) begin
      if (in_idx < NF*W*H && $urandom_range(0, 5) != 0) begin
        in_pix   <= img[in_idx/(W*H)][(in_idx%(W*H))/W][in_idx%W];
        in_valid <= 1;
        in_idx   <= in_idx + 1;
      end else in_valid <= 0;
    end
  end

  // inverse transformation model: queue with random latency
  coord_pair_t tq [$];
  int oc_cnt = 0, rq_cnt = 0, out_cnt = 0;
  int exp_q [$];
  longint t_q [$];
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (oc_valid && oc_ready) begin
        int f;
        f = oc_cnt / (W*H);
        checks++;
        if (int'(oc.x) != (oc_cnt % W) * 16 || int'(oc.y) != ((oc_cnt / W) % H) * 16) failures++;
        tq.push_back(mapping(f, int'(oc.x) / 16, int'(oc.y) / 16));
        oc_cnt++;
      end
      oc_ready <= $urandom_range(0, 4) != 0;
      if (rq_valid && rq_ready) begin
        exp_q.push_back(reference(rq_cnt / (W*H), rq));
        t_q.push_back(cyc);
        rq_cnt++;
        void'(tq.pop_front());
      end
      if (ev_wait) n_wait++;
      if (ev_full) n_full++;
      if (ev_outside) n_out++;
      if (out_valid && out_ready) begin
        int e;
        longint t0;
        e = exp_q.pop_front();
        t0 = t_q.pop_front();
        checks++;
        if (int'(out_pix) != e) begin
          failures++;
          if (failures < 10) $display("pixel %0d got %0d exp %0d", out_cnt, out_pix, e);
        end
        if (out_cnt < W*H) begin
          checks++;
          if (cyc - t0 != 4) failures++;
        end
        out_cnt++;
        if (out_cnt % (W*H) == 0)
          recon_mode <= (out_cnt / (W*H) == 1) ? RECON_BILINEAR : RECON_NEAREST;
      end
      out_ready <= (out_cnt < W*H) || ($urandom_range(0, 3) != 0);
    end
  end

  // the head of the model queue drives the request port
  logic hold;
  always_comb begin
    rq_valid = rst_n && tq.size() > 0 && hold;
    rq = (tq.size() > 0) ? tq[0] : '0;
  end
  always @(posedge clk) hold <= (rq_valid && !rq_ready) || ($urandom_range(0, 3) != 0);

  initial begin
    foreach (img[f, y, x]) img[f][y][x] = pixel_t'($urandom);
    in_valid = 0; out_ready = 1; oc_ready = 0; hold = 0;
    recon_mode = RECON_NEAREST; back_rows = 8'd4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (out_cnt == NF*W*H);
    checks += 3;
    if (n_wait == 0) failures++;
    if (n_full == 0) failures++;
    if (n_out == 0) failures++;
    $display("stalls=%0d held_input=%0d outside=%0d", n_wait, n_full, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
