// tb_beam_video_full - end-to-end test of the beam imaging chain at its
// default size: 720x576 frames, 64-line remap buffer, 10x10 peak window,
// footprint rectangle rows 200..400 and columns 300..500. The top keeps its
// default parameters; the constants below repeat them for the reference
// model. The test itself is in tb_e2e_body.svh.
module tb_beam_video_full;
  localparam int COLS  = 720;
  localparam int ROWS  = 576;
  localparam int LINES = 64;
  localparam int WIN   = 10;
  localparam int FRAC  = 16;
  localparam int FP_T  = 200;
  localparam int FP_B  = 400;
  localparam int FP_L  = 300;
  localparam int FP_R  = 500;

  `include "tb_e2e_body.svh"

  beam_video_top dut (.*);
endmodule
