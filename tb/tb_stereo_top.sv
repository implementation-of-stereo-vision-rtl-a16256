// tb_stereo_top: end-to-end run of the complete pipeline at a reduced size
// (32 x 24 pixels, 8 disparities, a 16-row transform buffer) over three
// frames. Stimulus, reference behaviour and mechanism counting are in
// stereo_top_tb_body.svh: identical left/right raw frames with the right
// image translated by the rectification block, so interior disparities must
// all equal the translation.
module tb_stereo_top;
  localparam int IMG_W = 32, IMG_H = 24, D = 8, NFRAMES = 3, BACK_ROWS = 8;
  `include "stereo_top_tb_body.svh"

  stereo_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .D(D), .NX(4), .NY(4),
               .DEPTH(32), .FIFO_DEPTH(4)) dut (.*);

  initial run_test();
endmodule
