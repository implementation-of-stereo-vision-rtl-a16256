// tb_stereo_top_full: end-to-end run of stereo_top at its default size
// (1280 x 960 pixels, 128 disparities, full transform buffer) over two
// frames. Stimulus, reference behaviour and mechanism counting are shared
// with tb_stereo_top (stereo_top_tb_body.svh); back_rows = 8.
module tb_stereo_top_full;
  localparam int IMG_W = 1280, IMG_H = 960, D = 128, NFRAMES = 2, BACK_ROWS = 8;
  `include "stereo_top_tb_body.svh"

  stereo_top dut (.*);

  initial run_test();
endmodule
