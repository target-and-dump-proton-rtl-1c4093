// median_filter - 3x3 median filter on a pixel stream, for removing isolated
// "popcorn" noise from the beam image.
//
// Two line buffers hold the previous two image rows. For each incoming pixel
// at (row, col) the filter forms a column of three (two rows up, one row up,
// the new pixel), shifts it into a 3x3 window and sends the window through
// the 19-step median exchange network of bvid_pkg. As in the source design,
// the median is issued at the coordinate of the newest (bottom-right) window
// pixel, so the filtered image is shifted one row down and one column right
// relative to the window centre.
//
// Where the window is not yet complete (the first two rows and the first two
// columns of each row) the incoming pixel is passed through unchanged; this
// border rule is this design's choice. With en low the filter is bypassed
// and every pixel passes through unchanged, but the line buffers keep
// loading so that switching back on takes effect at once.
//
// Interface: valid/ready pix_t streams in and out. sof re-aligns the row and
// column counters to (0,0); otherwise the position is counted from the COLS
// parameter. One register stage: one pixel per clock, one clock latency,
// in_ready = !out_valid || out_ready.
module median_filter
  import bvid_pkg::*;
#(
  parameter int COLS = 720,
  parameter int ROWS = 576
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,          // 1: filter, 0: pass through
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix
);

  localparam int CW = $clog2(COLS);
  localparam int RW = $clog2(ROWS);

  pixel_t     lb_up2 [COLS];    // row - 2
  pixel_t     lb_up1 [COLS];    // row - 1
  pixel_t     win [3][3];       // win[r][c]: r 0 = top, c 2 = newest column
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [CW-1:0] cur_col;
  logic [RW-1:0] cur_row;
  logic       fire;
  pixel_t     top_px, mid_px;
  pixel_t     nine [9];
  pixel_t     med;
  logic       full_win;

  assign fire     = in_valid && in_ready;
  assign in_ready = !out_valid || out_ready;

  // position of the incoming pixel; sof forces (0,0)
  always_comb begin
    cur_col = in_pix.sof ? '0 : col;
    cur_row = in_pix.sof ? '0 : row;
  end

  always_comb begin
    top_px = lb_up2[cur_col];
    mid_px = lb_up1[cur_col];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 2; c++)
        nine[r*3 + c] = win[r][c+1];
    nine[2] = top_px;
    nine[5] = mid_px;
    nine[8] = in_pix.data;
    med      = med9(nine);
    full_win = (cur_row >= RW'(2)) && (cur_col >= CW'(2));
  end

  always_ff @(posedge clk) begin
    if (fire) begin
      lb_up2[cur_col] <= mid_px;
      lb_up1[cur_col] <= in_pix.data;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= top_px;
      win[1][2] <= mid_px;
      win[2][2] <= in_pix.data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid    <= 1'b1;
        out_pix.sof  <= in_pix.sof;
        out_pix.eol  <= in_pix.eol;
        out_pix.data <= (en && full_win) ? med : in_pix.data;
        if (cur_col == CW'(COLS - 1)) begin
          col <= '0;
          row <= (cur_row == RW'(ROWS - 1)) ? '0 : cur_row + 1'b1;
        end else begin
          col <= cur_col + 1'b1;
          row <= cur_row;
        end
      end
    end
  end

  // a stalled output word must not change
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_pix));

endmodule
