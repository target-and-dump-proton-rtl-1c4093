// footprint_sum - how much of the beam falls outside a defined footprint.
//
// Over each frame the block sums all pixel values (sum_total), the values inside
// a rectangle (sum_in) and the rest (sum_out = sum_total - sum_in). The rectangle
// is given by its top, bottom, left and right borders in 0-based pixel
// coordinates; a pixel is inside when top <= row <= bottom and
// left <= col <= right (borders included, this design's reading). The source
// design leaves open whether a percentage should be produced later; like it,
// this block outputs the three sums.
//
// Interface: in_valid/in_pix observe an accepted pixel stream (tap, no
// back-pressure); sof re-aligns the position counters to (0,0). The borders
// are sampled with the first pixel of each frame and hold for that frame.
// One clock after the last pixel of a frame, res_valid pulses and sum_total,
// sum_in and sum_out hold the frame's sums until the next frame's result.
module footprint_sum
  import bvid_pkg::*;
#(
  parameter int COLS = 720,
  parameter int ROWS = 576,
  localparam int CW  = $clog2(COLS),
  localparam int RW  = $clog2(ROWS),
  localparam int SW  = PIX_W + $clog2(COLS * ROWS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] top,
  input  logic [RW-1:0] bottom,
  input  logic [CW-1:0] left,
  input  logic [CW-1:0] right,
  input  logic          in_valid,
  input  pix_t          in_pix,
  output logic          res_valid,
  output logic [SW-1:0] sum_total,
  output logic [SW-1:0] sum_in,
  output logic [SW-1:0] sum_out
);

  logic [CW-1:0] col, cur_col;
  logic [RW-1:0] row, cur_row;
  logic          first_px, last_px, in_rect;
  logic [RW-1:0] top_q, bottom_q, top_use, bottom_use;
  logic [CW-1:0] left_q, right_q, left_use, right_use;
  logic [SW-1:0] acc_t, acc_i, nxt_t, nxt_i;

  always_comb begin
    cur_col    = in_pix.sof ? '0 : col;
    cur_row    = in_pix.sof ? '0 : row;
    first_px   = (cur_col == '0) && (cur_row == '0);
    last_px    = (cur_col == CW'(COLS - 1)) && (cur_row == RW'(ROWS - 1));
    // the first pixel of a frame already uses the new borders
    top_use    = first_px ? top    : top_q;
    bottom_use = first_px ? bottom : bottom_q;
    left_use   = first_px ? left   : left_q;
    right_use  = first_px ? right  : right_q;
    in_rect    = (cur_row >= top_use) && (cur_row <= bottom_use) &&
                 (cur_col >= left_use) && (cur_col <= right_use);
    nxt_t      = (first_px ? '0 : acc_t) + SW'(in_pix.data);
    nxt_i      = (first_px ? '0 : acc_i) + (in_rect ? SW'(in_pix.data) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0;
      top_q <= '0; bottom_q <= '0; left_q <= '0; right_q <= '0;
      acc_t <= '0; acc_i <= '0;
      res_valid <= 1'b0;
      sum_total <= '0; sum_in <= '0; sum_out <= '0;
    end else begin
      res_valid <= 1'b0;
      if (in_valid) begin
        acc_t <= nxt_t;
        acc_i <= nxt_i;
        if (first_px) begin
          top_q <= top; bottom_q <= bottom; left_q <= left; right_q <= right;
        end
        if (cur_col == CW'(COLS - 1)) begin
          col <= '0;
          row <= last_px ? '0 : cur_row + 1'b1;
        end else begin
          col <= cur_col + 1'b1;
          row <= cur_row;
        end
        if (last_px) begin
          res_valid <= 1'b1;
          sum_total     <= nxt_t;
          sum_in    <= nxt_i;
          sum_out   <= nxt_t - nxt_i;
        end
      end
    end
  end

endmodule
