// geo_remap - geometrical distortion correction by table remapping.
//
// Every output pixel (r, c) takes the value of one source pixel whose column
// and row come from a remap table entry (map_t) streamed alongside, one entry
// per output pixel in raster order. Source rows are held in a circular line
// buffer of LINES rows (LINES a power of two, HALF = LINES/2). Output row r
// may fetch from source rows r-(HALF-1) .. r+(HALF-1), so the buffer covers a
// vertical displacement of HALF-1 rows either way; a map entry pointing
// outside that band or outside the image yields a black (0) pixel. The one
// buffer row left over is the row being filled while the band is read, which
// lets source and output both run at one pixel per clock.
// The source design streams image and map from memory in the same way and
// sizes the buffer for the displacement to be corrected (64 lines for its
// 720x576 timing runs, 128 lines in its rotation tests); the centred band,
// the black fill and the flow control are this design's choices.
//
// Flow control: source row w may be written once output row r satisfies
// w <= r + HALF, because then the row it overwrites (w - LINES) is below the
// band of every remaining output row. Output row r starts once source rows
// up to min(r + HALF - 1, ROWS - 1) are in. So at the start of a frame HALF
// source rows enter before the first output pixel, and after the last output
// pixel of a frame the input side starts the next frame. sof/eol of the input
// are not used (the frame size is fixed by COLS and ROWS); the output carries
// its own sof and eol.
//
// Interface: three valid/ready streams: source pixels in, map entries in,
// corrected pixels out. The line buffer is read synchronously, so the output
// is registered: at most one pixel per clock, one clock from map entry to
// output pixel. Two status outputs: in_stall is high in a cycle where a
// source pixel waits because the buffer is full, and out_oob comes with an
// output pixel that was filled because its source lay outside the band or the
// image.
module geo_remap
  import bvid_pkg::*;
#(
  parameter int COLS  = 720,
  parameter int ROWS  = 576,
  parameter int LINES = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  input  logic map_valid,
  output logic map_ready,
  input  map_t map,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix,
  output logic out_oob,
  output logic in_stall
);

  localparam int HALF = LINES / 2;
  localparam int CW   = $clog2(COLS);
  localparam int RW   = $clog2(ROWS + 1);   // counts up to ROWS
  localparam int LW   = $clog2(LINES);

  pixel_t mem [LINES][COLS];

  // ------------------------------------------------------------ write side
  logic [CW-1:0] wr_col;
  logic [RW-1:0] wr_row;              // rows fully written = wr_row
  logic [RW-1:0] rd_row;
  logic [CW-1:0] rd_col;
  logic          in_fire;

  assign in_ready = (wr_row < RW'(ROWS)) && ((RW+1)'(wr_row) <= (RW+1)'(rd_row) + (RW+1)'(HALF));
  assign in_fire  = in_valid && in_ready;
  assign in_stall = in_valid && !in_ready;

  always_ff @(posedge clk) begin
    if (in_fire) mem[wr_row[LW-1:0]][wr_col] <= in_pix.data;
  end

  // ------------------------------------------------------------- read side
  logic          rows_ok, advance, map_fire, last_out;
  logic signed [MAP_W:0] sx, sy, lo, hi;
  logic          in_band;

  always_comb begin
    // output row rd_row needs source rows up to min(rd_row + HALF - 1, ROWS - 1)
    if ((RW+1)'(rd_row) + (RW+1)'(HALF) >= (RW+1)'(ROWS))
      rows_ok = (wr_row == RW'(ROWS));
    else
      rows_ok = (RW+1)'(wr_row) >= (RW+1)'(rd_row) + (RW+1)'(HALF);
    advance   = !out_valid || out_ready;
    map_ready = advance && rows_ok;
    map_fire  = map_valid && map_ready;
    last_out  = (rd_row == RW'(ROWS - 1)) && (rd_col == CW'(COLS - 1));
    sx = (MAP_W+1)'(map.src_x);
    sy = (MAP_W+1)'(map.src_y);
    lo = (MAP_W+1)'(rd_row) - (MAP_W+1)'(HALF - 1);
    hi = (MAP_W+1)'(rd_row) + (MAP_W+1)'(HALF - 1);
    in_band = (sx >= 0) && (sx < (MAP_W+1)'(COLS)) &&
              (sy >= 0) && (sy < (MAP_W+1)'(ROWS)) &&
              (sy >= lo) && (sy <= hi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_col    <= '0;
      wr_row    <= '0;
      rd_col    <= '0;
      rd_row    <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_oob   <= 1'b0;
    end else begin
      if (in_fire) begin
        if (wr_col == CW'(COLS - 1)) begin
          wr_col <= '0;
          wr_row <= wr_row + 1'b1;
        end else begin
          wr_col <= wr_col + 1'b1;
        end
      end
      if (advance) out_valid <= 1'b0;
      if (map_fire) begin
        out_valid    <= 1'b1;
        out_pix.sof  <= (rd_row == '0) && (rd_col == '0);
        out_pix.eol  <= (rd_col == CW'(COLS - 1));
        out_pix.data <= in_band ? mem[sy[LW-1:0]][sx[CW-1:0]] : '0;
        out_oob      <= !in_band;
        if (rd_col == CW'(COLS - 1)) begin
          rd_col <= '0;
          rd_row <= last_out ? '0 : rd_row + 1'b1;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
        // the whole frame is in once the last output pixel goes: restart input
        if (last_out) begin
          wr_row <= '0;
          wr_col <= '0;
        end
      end
    end
  end

  // the line buffer depth must be a power of two for the row slot index
  initial assert (LINES == (1 << LW) && LINES >= 2)
    else $error("LINES must be a power of two");

  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_pix));

endmodule
