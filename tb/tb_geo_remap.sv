// tb_geo_remap - self-checking test of the remap-based distortion correction.
//
// A 24x20 image passes through a remapper with an 8-line buffer (band of 3
// rows up and down) under four maps: identity, a shear that moves rows up and
// down across the band (a small rotation), a random map that also points
// outside the band and outside the image (including negative coordinates),
// and identity again. Each output pixel and its oob flag are compared with a
// reference lookup done here. The source, map and output streams get random
// gaps and back-pressure in the middle frames; the first and last frames run
// without them to check the rate of one output pixel per clock.
module tb_geo_remap;
  import bvid_pkg::*;

  localparam int COLS  = 24;
  localparam int ROWS  = 20;
  localparam int LINES = 8;
  localparam int HALF  = LINES / 2;
  localparam int NPIX  = COLS * ROWS;
  localparam int NFRAMES = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready, map_valid, map_ready, out_valid, out_ready, out_oob, in_stall;
  pix_t in_pix, out_pix;
  map_t map;
  int checks = 0, failures = 0;

  geo_remap #(.COLS(COLS), .ROWS(ROWS), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pixel_t img [NFRAMES][NPIX];
  int     mx [NFRAMES][NPIX], my [NFRAMES][NPIX];
  int     n_out = 0, n_oob = 0, n_stall = 0, cyc = 0;
  int     t_first [NFRAMES], t_last [NFRAMES];
  bit     jitter;

  always @(negedge clk) cyc++;

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < NPIX; i++) begin
        int r, c;
        r = i / COLS;
        c = i % COLS;
        img[f][i] = pixel_t'($urandom_range(1, 255));
        case (f)
          1: begin mx[f][i] = c; my[f][i] = r + (c - COLS / 2) / 3; end
          2: begin
            mx[f][i] = c + $urandom_range(0, 8) - 4;
            my[f][i] = r + $urandom_range(0, 12) - 6;
          end
          default: begin mx[f][i] = c; my[f][i] = r; end
        endcase
      end
  end

  function automatic bit in_band(int f, int i);
    int r;
    r = (i % NPIX) / COLS;
    return mx[f][i] >= 0 && mx[f][i] < COLS && my[f][i] >= 0 && my[f][i] < ROWS &&
           my[f][i] >= r - HALF + 1 && my[f][i] <= r + HALF - 1;
  endfunction

  // source stream
  initial begin
    in_valid = 1'b0;
    in_pix = '0;
    @(posedge rst_n);
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < NPIX; i++) begin
        if (f == 1 || f == 2) while ($urandom_range(0, 4) == 0) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        in_valid    = 1'b1;
        in_pix.data = img[f][i];
        in_pix.sof  = (i == 0);
        in_pix.eol  = (i % COLS == COLS - 1);
        do @(posedge clk); while (!in_ready);
        #1;
      end
    in_valid = 1'b0;
  end

  // map stream
  initial begin
    map_valid = 1'b0;
    map = '0;
    @(posedge rst_n);
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < NPIX; i++) begin
        if (f == 1 || f == 2) while ($urandom_range(0, 4) == 0) begin
          map_valid = 1'b0;
          @(posedge clk); #1;
        end
        map_valid = 1'b1;
        map.src_x = MAP_W'(mx[f][i]);
        map.src_y = MAP_W'(my[f][i]);
        do @(posedge clk); while (!map_ready);
        #1;
      end
    map_valid = 1'b0;
  end

  always @(negedge clk) begin
    jitter = (n_out >= NPIX) && (n_out < 3 * NPIX);
    out_ready = jitter ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && in_stall) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      int f, i;
      pixel_t e;
      f = n_out / NPIX;
      i = n_out % NPIX;
      e = in_band(f, i) ? img[f][my[f][i] * COLS + mx[f][i]] : 8'd0;
      checks++;
      if (out_pix.data !== e || out_oob !== !in_band(f, i) ||
          out_pix.sof !== (i == 0) || out_pix.eol !== (i % COLS == COLS - 1)) begin
        failures++;
        if (failures < 10)
          $display("frame %0d pixel %0d: got %0d oob %0d, expected %0d oob %0d",
                   f, i, out_pix.data, out_oob, e, !in_band(f, i));
      end
      if (!in_band(f, i)) n_oob++;
      if (i == 0) t_first[f] = cyc;
      if (i == NPIX - 1) t_last[f] = cyc;
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_out == NFRAMES * NPIX);
    repeat (5) @(posedge clk);
    // rate: undisturbed frames give one pixel per clock
    foreach (t_first[f]) if (f == 0 || f == NFRAMES - 1) begin
      checks++;
      if (t_last[f] - t_first[f] != NPIX - 1) begin
        failures++;
        $display("frame %0d took %0d clocks for %0d pixels", f, t_last[f] - t_first[f] + 1, NPIX);
      end
    end
    // the out-of-band fill and the full-buffer stall both happened
    checks += 2;
    if (n_oob == 0) begin failures++; $display("no out-of-band pixel"); end
    if (n_stall == 0) begin failures++; $display("source never stalled"); end
    $display("oob pixels %0d, stall cycles %0d", n_oob, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
