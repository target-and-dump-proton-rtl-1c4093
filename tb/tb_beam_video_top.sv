// tb_beam_video_top - end-to-end test of the beam imaging chain at a reduced
// frame size (48x32 pixels, 8-line remap buffer, 10x10 peak window). The test
// itself is in tb_e2e_body.svh; see there for the frames and checks.
module tb_beam_video_top;
  localparam int COLS  = 48;
  localparam int ROWS  = 32;
  localparam int LINES = 8;
  localparam int WIN   = 10;
  localparam int FRAC  = 16;
  localparam int FP_T  = 8;
  localparam int FP_B  = 20;
  localparam int FP_L  = 12;
  localparam int FP_R  = 30;

  `include "tb_e2e_body.svh"

  beam_video_top #(.COLS(COLS), .ROWS(ROWS), .LINES(LINES), .WIN(WIN), .FRAC(FRAC)) dut (.*);
endmodule
