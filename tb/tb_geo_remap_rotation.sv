// tb_geo_remap_rotation - distortion correction of a rotated grid image at the
// size used to exercise the remapper in its original study: a 585x585 image
// and a 128-line buffer (band of 63 rows either way).
//
// The source is a grid (bright lines every 32 pixels on a dim background).
// The map rotates the image by 10 degrees about its centre, which moves
// source rows by up to about 55 rows: inside the band, so no pixel may be
// lost except those whose source lies outside the image. A second frame uses
// a 1:1 map and must come out unchanged. Every output pixel is compared with
// a direct lookup; the testbench also checks that the rotated frame needed
// no band fill and that the 1:1 frame ran at one pixel per clock.
module tb_geo_remap_rotation;
  import bvid_pkg::*;

  localparam int COLS  = 585;
  localparam int ROWS  = 585;
  localparam int LINES = 128;
  localparam int HALF  = LINES / 2;
  localparam int NPIX  = COLS * ROWS;
  localparam real ANGLE = 10.0 * 3.14159265358979 / 180.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready, map_valid, map_ready, out_valid, out_ready, out_oob, in_stall;
  pix_t in_pix, out_pix;
  map_t map;
  int checks = 0, failures = 0;

  geo_remap #(.COLS(COLS), .ROWS(ROWS), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NPIX + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     mx [NPIX], my [NPIX];
  int     n_out = 0, n_band_fill = 0, n_outside = 0, cyc = 0, max_disp = 0;
  int     t_first, t_last;

  always @(negedge clk) cyc++;

  function automatic pixel_t grid(int i);
    return ((i / COLS) % 32 == 0 || (i % COLS) % 32 == 0) ? 8'd230 : 8'd20;
  endfunction

  initial begin
    real ccx, ccy, cs, sn;
    ccx = real'(COLS - 1) / 2.0;
    ccy = real'(ROWS - 1) / 2.0;
    cs = $cos(ANGLE);
    sn = $sin(ANGLE);
    for (int i = 0; i < NPIX; i++) begin
      real dx, dy;
      int d;
      dx = real'(i % COLS) - ccx;
      dy = real'(i / COLS) - ccy;
      mx[i] = int'($floor(ccx + dx * cs - dy * sn + 0.5));
      my[i] = int'($floor(ccy + dx * sn + dy * cs + 0.5));
      d = my[i] - i / COLS;
      if (d < 0) d = -d;
      if (mx[i] >= 0 && mx[i] < COLS && my[i] >= 0 && my[i] < ROWS && d > max_disp) max_disp = d;
    end
  end

  // source: the grid, twice
  initial begin
    in_valid = 1'b0;
    in_pix = '0;
    wait (rst_n);
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < NPIX; i++) begin
        in_valid    = 1'b1;
        in_pix.data = grid(i);
        in_pix.sof  = (i == 0);
        in_pix.eol  = (i % COLS == COLS - 1);
        do @(posedge clk); while (!in_ready);
        #1;
      end
    in_valid = 1'b0;
  end

  // map: rotation, then 1:1
  initial begin
    map_valid = 1'b0;
    map = '0;
    wait (rst_n);
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < NPIX; i++) begin
        map_valid = 1'b1;
        map.src_x = MAP_W'(f == 0 ? mx[i] : i % COLS);
        map.src_y = MAP_W'(f == 0 ? my[i] : i / COLS);
        do @(posedge clk); while (!map_ready);
        #1;
      end
    map_valid = 1'b0;
  end

  assign out_ready = 1'b1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, i, sx, sy;
      bit inside_img;
      pixel_t e;
      f = n_out / NPIX;
      i = n_out % NPIX;
      sx = (f == 0) ? mx[i] : i % COLS;
      sy = (f == 0) ? my[i] : i / COLS;
      inside_img = sx >= 0 && sx < COLS && sy >= 0 && sy < ROWS;
      e = inside_img ? grid(sy * COLS + sx) : 8'd0;
      checks++;
      if (out_pix.data !== e || out_oob !== !inside_img) begin
        failures++;
        if (failures < 10)
          $display("frame %0d pixel %0d: got %0d oob %0d expected %0d", f, i, out_pix.data, out_oob, e);
      end
      if (!inside_img) n_outside++;
      if (out_oob && inside_img) n_band_fill++;
      if (f == 1 && i == 0) t_first = cyc;
      if (f == 1 && i == NPIX - 1) t_last = cyc;
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_out == 2 * NPIX);
    checks += 3;
    if (n_band_fill != 0) failures++;
    if (n_outside == 0) failures++;
    if (t_last - t_first != NPIX - 1) failures++;
    $display("largest vertical displacement %0d rows (band %0d), %0d pixels from outside the image",
             max_disp, HALF - 1, n_outside);
    $display("1:1 frame: %0d pixels in %0d clocks", NPIX, t_last - t_first + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
