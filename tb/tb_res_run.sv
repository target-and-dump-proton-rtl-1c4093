// tb_res_run - one frame of a synthetic beam image through beam_video_top at
// a given frame size, used by tb_beam_video_resolutions.
//
// The image is a bright elliptical spot with a little noise and some popcorn
// pixels; the median filter is on and the map is 1:1. The testbench computes
// the filtered image and the three frame statistics itself, compares every
// output pixel and every result, and measures the clocks from the first input
// pixel to the last output pixel and to the last frame result. It raises done
// when finished; checks and failures are its counts.
module tb_res_run #(
  parameter int COLS = 720,
  parameter int ROWS = 576
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import bvid_pkg::*;

  localparam int LINES = 64;
  localparam int WIN   = 10;
  localparam int FRAC  = 16;
  localparam int NPIX  = COLS * ROWS;
  localparam int CW   = $clog2(COLS);
  localparam int RW   = $clog2(ROWS);
  localparam int XW   = $clog2(COLS + 1);
  localparam int YW   = $clog2(ROWS + 1);
  localparam int SW   = PIX_W + $clog2(COLS * ROWS + 1);
  localparam int WSW  = PIX_W + $clog2(WIN * WIN + 1);

  logic median_en;
  logic [RW-1:0] fp_top, fp_bottom;
  logic [CW-1:0] fp_left, fp_right;
  logic in_valid, in_ready, map_valid, map_ready, out_valid, out_ready, out_oob, remap_stall;
  pix_t in_pix, out_pix;
  map_t map;
  logic cen_valid, cen_empty, fp_valid, pk_valid;
  logic [SW-1:0] cen_sum, fp_total, fp_inside, fp_outside;
  logic [XW+FRAC-1:0] cen_x, cen_rms_x;
  logic [YW+FRAC-1:0] cen_y, cen_rms_y;
  logic [WSW-1:0] pk_sum;
  logic [PIX_W+FRAC-1:0] pk_mean;
  logic [RW-1:0] pk_row;
  logic [CW-1:0] pk_col;

  beam_video_top #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  pixel_t src [NPIX];
  pixel_t flt [NPIX];
  real    e_cx, e_cy, e_rx, e_ry;
  longint e_sum, e_in;
  int     e_pk, e_pr, e_pc;
  longint cyc = 0, t_in, t_out, t_res;
  int     n_out = 0, n_res = 0;

  always @(negedge clk) cyc++;

  initial begin
    real s, sx, sy, sxx, syy;
    int pr, pc;
    checks = 0;
    failures = 0;
    done = 1'b0;
    pr = ROWS * 3 / 7;
    pc = COLS * 5 / 8;
    for (int i = 0; i < NPIX; i++) begin
      int r, c, d;
      r = i / COLS;
      c = i % COLS;
      d = ((r - pr) * (r - pr) * 4 + (c - pc) * (c - pc)) * 250 / (ROWS * ROWS / 9 + 1);
      src[i] = pixel_t'((d < 230 ? 230 - d : 0) + $urandom_range(0, 15));
      if ($urandom_range(0, 199) == 0) src[i] = 8'd255;
    end
    for (int i = 0; i < NPIX; i++) begin
      int r, c;
      pixel_t w [9];
      r = i / COLS;
      c = i % COLS;
      flt[i] = src[i];
      if (r >= 2 && c >= 2) begin
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) w[a*3+b] = src[(r-2+a)*COLS + c-2+b];
        w.sort();
        flt[i] = w[4];
      end
    end
    s = 0; sx = 0; sy = 0; sxx = 0; syy = 0; e_sum = 0; e_in = 0;
    for (int i = 0; i < NPIX; i++) begin
      real m, n, p;
      int r, c;
      r = i / COLS;
      c = i % COLS;
      p = real'(flt[i]);
      m = real'(c + 1);
      n = real'(r + 1);
      s += p; sx += m * p; sy += n * p; sxx += m * m * p; syy += n * n * p;
      e_sum += flt[i];
      if (r >= ROWS / 3 && r <= 2 * ROWS / 3 && c >= COLS / 3 && c <= 2 * COLS / 3) e_in += flt[i];
    end
    e_cx = sx / s;
    e_cy = sy / s;
    e_rx = $sqrt(sxx / s - e_cx * e_cx);
    e_ry = $sqrt(syy / s - e_cy * e_cy);
    e_pk = -1;
    begin
      int colsum [COLS];
      for (int r = WIN - 1; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          colsum[c] = 0;
          for (int k = 0; k < WIN; k++) colsum[c] += flt[(r - k) * COLS + c];
        end
        for (int c = WIN - 1; c < COLS; c++) begin
          int ws;
          ws = 0;
          for (int k = 0; k < WIN; k++) ws += colsum[c - k];
          if (ws > e_pk) begin
            e_pk = ws;
            e_pr = r - WIN + 1 + WIN / 2;
            e_pc = c - WIN + 1 + WIN / 2;
          end
        end
      end
    end
  end

  // streams
  initial begin
    median_en = 1'b1;
    fp_top = RW'(ROWS / 3); fp_bottom = RW'(2 * ROWS / 3);
    fp_left = CW'(COLS / 3); fp_right = CW'(2 * COLS / 3);
    in_valid = 1'b0;
    in_pix = '0;
    wait (rst_n);
    @(posedge clk); #1;
    for (int i = 0; i < NPIX; i++) begin
      in_valid    = 1'b1;
      in_pix.data = src[i];
      in_pix.sof  = (i == 0);
      in_pix.eol  = (i % COLS == COLS - 1);
      do @(posedge clk); while (!in_ready);
      if (i == 0) t_in = cyc;
      #1;
    end
    in_valid = 1'b0;
  end

  initial begin
    map_valid = 1'b0;
    map = '0;
    wait (rst_n);
    @(posedge clk); #1;
    for (int i = 0; i < NPIX; i++) begin
      map_valid = 1'b1;
      map.src_x = MAP_W'(i % COLS);
      map.src_y = MAP_W'(i / COLS);
      do @(posedge clk); while (!map_ready);
      #1;
    end
    map_valid = 1'b0;
  end

  assign out_ready = 1'b1;

  function automatic void near(string what, real got, real want);
    checks++;
    if (got - want > 1.0 / 16384 || want - got > 1.0 / 16384) begin
      failures++;
      $display("%0dx%0d %s: got %f expected %f", COLS, ROWS, what, got, want);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_pix.data !== flt[n_out] || out_oob) begin
        failures++;
        if (failures < 5) $display("%0dx%0d pixel %0d: got %0d expected %0d",
                                   COLS, ROWS, n_out, out_pix.data, flt[n_out]);
      end
      if (n_out == NPIX - 1) t_out = cyc;
      n_out++;
    end
    if (rst_n && cen_valid) begin
      checks++;
      if (longint'(cen_sum) != e_sum) failures++;
      near("cx", real'(cen_x) / 65536.0, e_cx);
      near("cy", real'(cen_y) / 65536.0, e_cy);
      near("rms_x", real'(cen_rms_x) / 65536.0, e_rx);
      near("rms_y", real'(cen_rms_y) / 65536.0, e_ry);
      n_res++;
      t_res = cyc;
    end
    if (rst_n && fp_valid) begin
      checks += 3;
      if (longint'(fp_total) != e_sum) failures++;
      if (longint'(fp_inside) != e_in) failures++;
      if (longint'(fp_outside) != e_sum - e_in) failures++;
      n_res++;
    end
    if (rst_n && pk_valid) begin
      checks += 4;
      if (int'(pk_sum) != e_pk) failures++;
      if (longint'(pk_mean) != (longint'(e_pk) << FRAC) / (WIN * WIN)) failures++;
      if (int'(pk_row) != e_pr) failures++;
      if (int'(pk_col) != e_pc) failures++;
      n_res++;
    end
  end

  initial begin
    wait (rst_n);
    wait (n_out == NPIX && n_res == 3);
    repeat (2) @(posedge clk);
    // one pixel per clock through the chain: the whole frame leaves within
    // NPIX clocks plus the remap fill of LINES/2 rows and a few clocks
    checks++;
    if (t_out - t_in > longint'(NPIX + (LINES / 2) * COLS + 8)) begin
      failures++;
      $display("%0dx%0d: frame took %0d clocks", COLS, ROWS, t_out - t_in + 1);
    end
    $display("%0dx%0d: %0d pixels, last output pixel after %0d clocks, last result after %0d clocks (Res + %0d)",
             COLS, ROWS, NPIX, t_out - t_in + 1, t_res - t_in + 1, t_res - t_in + 1 - NPIX);
    $display("%0dx%0d: centroid (%f, %f) rms (%f, %f), peak mean %f at (%0d, %0d)", COLS, ROWS,
             real'(cen_x) / 65536.0, real'(cen_y) / 65536.0, real'(cen_rms_x) / 65536.0,
             real'(cen_rms_y) / 65536.0, real'(pk_mean) / 65536.0, pk_row, pk_col);
    done = 1'b1;
  end
endmodule
