// Shared stimulus and checking for the stereo_top testbenches. The including
// module declares IMG_W, IMG_H, D, NFRAMES and BACK_ROWS, instantiates
// stereo_top as `dut` on the signals declared here, and calls run_test().
//
// Scene: the left and right cameras deliver the same raw Bayer frames of
// random texture; the third camera carries unrelated random bytes. The left
// rectification is the identity and the right one a translation by SHIFT
// pixels (input column = output column + SHIFT), and both lens corrections
// are the identity. The right camera's output image is therefore the left
// one moved SHIFT pixels to the left, so every interior pixel must come out
// with disparity SHIFT and pass the left-right check. Pixels within SHIFT of
// the left edge have no true partner; most of them must be rejected (the rest
// can match by chance, since their windows wrap into the previous row).
// The first rows of the first frame are not checked: their windows still hold
// line-buffer contents from before the first frame.
//
// Stimulus: random gaps on the input stream, random back-pressure on the
// disparity output and on the third camera; reconstruction switches to
// bilinear after the first frame and back after the second; the left-right
// filter is switched off for the last quarter of the checked outputs.
// Counted mechanisms (each must occur): request stall while data is not yet
// buffered, input held on a full buffer, requests outside the frame, output
// stall, mode switch, left-right rejection, filter off.

  import stereo_pkg::*;
  localparam int SHIFT = 3;
  localparam int NPIX  = IMG_W * IMG_H;
  localparam int XW    = $clog2(IMG_W);
  localparam int DW    = $clog2(D);
  localparam int LR_OFF_AT = (NFRAMES - 1) * NPIX + NPIX / 4;
  localparam int END_AT    = (NFRAMES - 1) * NPIX + NPIX / 2;

  logic clk = 0, rst_n = 0;
  recon_mode_e recon_mode;
  logic [7:0]  back_rows;
  logic        lr_enable;
  logic signed [31:0] h_left [9], h_right [9];
  coord_t      xc_left, yc_left, xc_right, yc_right;
  logic [19:0] inv_ax_left, inv_ay_left, inv_ax_right, inv_ay_right;
  logic signed [23:0] k1_left, k2_left, k1_right, k2_right;
  logic [23:0] in_data;
  logic        in_valid, in_ready;
  pixel_t      cam2_pix;
  logic        cam2_valid, cam2_ready;
  logic [DW-1:0] disp;
  logic [XW-1:0] disp_x;
  logic        disp_ok, disp_valid, disp_ready;
  logic [1:0]  ev_wait, ev_full, ev_outside;

  int checks = 0, failures = 0;
  longint in_cnt = 0, nout = 0, n_cam2 = 0;
  int n_wait [2], n_full [2], n_outside [2];
  int n_stall = 0, n_switch = 0, n_reject = 0, n_lr_off = 0, n_good = 0;
  int prev_x = -1;
  int n_edge = 0, n_edge_rej = 0;
  pixel_t cam2_q [$];

  always #5 clk = ~clk;

  initial begin
    for (int s = 0; s < 2; s++) begin n_wait[s] = 0; n_full[s] = 0; n_outside[s] = 0; end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // input stream: identical raw data for cameras 0 and 1
      if (!in_valid || in_ready) begin
        if (in_cnt < longint'(NFRAMES) * NPIX && $urandom_range(0, 7) != 0) begin
          pixel_t raw, c2;
          raw = pixel_t'($urandom);
          c2  = pixel_t'($urandom);
          in_data  <= {raw, raw, c2};
          in_valid <= 1'b1;
          cam2_q.push_back(c2);
          in_cnt <= in_cnt + 1;
        end else in_valid <= 1'b0;
      end
      cam2_ready <= $urandom_range(0, 7) != 0;
      disp_ready <= $urandom_range(0, 2) == 0;

      if (cam2_valid && cam2_ready) begin
        checks++;
        if (cam2_q.size() == 0 || cam2_pix != cam2_q[0]) failures++;
        if (cam2_q.size() != 0) void'(cam2_q.pop_front());
        n_cam2++;
      end

      for (int s = 0; s < 2; s++) begin
        n_wait[s]    += int'(ev_wait[s]);
        n_full[s]    += int'(ev_full[s]);
        n_outside[s] += int'(ev_outside[s]);
      end
      if (disp_valid && !disp_ready) n_stall++;

      if (disp_valid && disp_ready) begin
        // columns advance by one per output and wrap at the row end
        // (the first D-1 outputs only empty the filling delay line)
        if (nout >= D) begin
          checks++;
          if (int'(disp_x) != (prev_x + 1) % IMG_W) failures++;
        end
        prev_x = int'(disp_x);
        if (lr_enable && !disp_ok) n_reject++;
        if (!lr_enable) begin
          n_lr_off++;
          checks++;
          if (!disp_ok) failures++;
        end
        if (nout >= 6 * IMG_W + D && int'(disp_x) >= D && int'(disp_x) <= IMG_W - 5) begin
          checks += 2;
          if (int'(disp) != SHIFT) failures++;
          if (!disp_ok) failures++;
          if (int'(disp) == SHIFT && disp_ok) n_good++;
        end
        if (lr_enable && nout >= 6 * IMG_W + D && int'(disp_x) < SHIFT) begin
          // the true partner lies outside the row; most of these must be
          // rejected (the rest match by chance against row-wrapped windows)
          n_edge++;
          if (!disp_ok) n_edge_rej++;
        end
        nout <= nout + 1;
      end
    end
  end

  // reconstruction mode follows the input frame count
  always @(posedge clk) begin
    if (in_cnt == NPIX && recon_mode == RECON_NEAREST && n_switch == 0) begin
      recon_mode <= RECON_BILINEAR; n_switch++;
    end
    if (in_cnt == 2 * NPIX && NFRAMES >= 3 && recon_mode == RECON_BILINEAR) begin
      recon_mode <= RECON_NEAREST; n_switch++;
    end
    if (nout >= LR_OFF_AT) lr_enable <= 1'b0;
  end

  task automatic run_test();
    longint limit;
    limit = longint'(NFRAMES) * NPIX * 6 + 100000;
    for (int i = 0; i < 9; i++) begin
      h_left[i] = 0; h_right[i] = 0;
    end
    h_left[0] = 1 <<< 20; h_left[4] = 1 <<< 20; h_left[8] = 1 <<< 20;
    h_right[0] = 1 <<< 20; h_right[4] = 1 <<< 20; h_right[8] = 1 <<< 20;
    h_right[2] = SHIFT <<< 20;
    xc_left = coord_t'((IMG_W / 2) * 16); yc_left = coord_t'((IMG_H / 2) * 16);
    xc_right = xc_left; yc_right = yc_left;
    inv_ax_left = 20'd65536; inv_ay_left = 20'd65536;
    inv_ax_right = 20'd65536; inv_ay_right = 20'd65536;
    k1_left = 0; k2_left = 0; k1_right = 0; k2_right = 0;
    recon_mode = RECON_NEAREST;
    back_rows = 8'(BACK_ROWS);
    lr_enable = 1'b1;
    in_data = '0; in_valid = 1'b0; cam2_ready = 1'b0; disp_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (in_cnt == longint'(NFRAMES) * NPIX && nout >= END_AT);
      end
      begin
        repeat (limit) @(posedge clk);
        $display("watchdog: in=%0d out=%0d", in_cnt, nout);
        failures++;
      end
    join_any
    repeat (20) @(posedge clk);
    // every mechanism must have been exercised
    for (int s = 0; s < 2; s++) begin
      checks += 3;
      if (n_wait[s] == 0) failures++;
      if (n_full[s] == 0) failures++;
      if (n_outside[s] == 0) failures++;
    end
    checks += 7;
    if (2 * n_edge_rej < n_edge || n_edge == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_switch < 2 && NFRAMES >= 3 || n_switch < 1) failures++;
    if (n_reject == 0) failures++;
    if (n_lr_off == 0) failures++;
    if (n_good < (IMG_W - D - 4) * IMG_H) failures++;
    if (n_cam2 != in_cnt) failures++;
    $display("mechanisms: wait=%0d/%0d full=%0d/%0d outside=%0d/%0d out_stall=%0d switch=%0d lr_reject=%0d edge_reject=%0d/%0d lr_off=%0d good=%0d outputs=%0d",
             n_wait[0], n_wait[1], n_full[0], n_full[1], n_outside[0], n_outside[1],
             n_stall, n_switch, n_reject, n_edge_rej, n_edge, n_lr_off, n_good, nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
