// tb_e2e_body.svh - end-to-end test of beam_video_top, shared by the reduced
// and the full-size testbench. The including module defines COLS, ROWS,
// LINES, WIN, FRAC and the rectangle FP_T/FP_B/FP_L/FP_R, includes this file
// and then instantiates beam_video_top as dut with (.*).
//
// Three frames run through the whole chain:
//   frame 0  filter off (bypass), 1:1 map, output never held: checks the
//            rate of one pixel per clock through the chain
//   frame 1  filter on, popcorn noise, a shear map that moves source rows
//            beyond the remap band (black fill), random output back-pressure
//   frame 2  all black, filter on, 1:1 map: empty centroid, tied peak windows
// The testbench computes every stage itself (median by sorting, the remap
// lookup, then centroid, footprint and peak density by their definitions) and
// compares every output pixel and every frame result. It counts how often each
// mechanism happened (filter on and changing pixels, bypass, remap stall,
// black fill, output back-pressure, empty frame, beam inside and outside the
// footprint) and fails a mechanism that never occurred.

  import bvid_pkg::*;

  localparam int NPIX    = COLS * ROWS;
  localparam int NFRAMES = 3;
  localparam int HALF    = LINES / 2;
  localparam int CW   = $clog2(COLS);
  localparam int RW   = $clog2(ROWS);
  localparam int XW   = $clog2(COLS + 1);
  localparam int YW   = $clog2(ROWS + 1);
  localparam int SW   = PIX_W + $clog2(COLS * ROWS + 1);
  localparam int WSW  = PIX_W + $clog2(WIN * WIN + 1);
  localparam int SHEAR = (COLS / 2) / (HALF + 2);   // columns per row of shift

  logic clk = 1'b0;
  logic rst_n = 1'b0;
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

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  initial begin
    repeat (NFRAMES * NPIX * 3 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ stimulus and model
  pixel_t src [NFRAMES][NPIX];
  pixel_t flt [NPIX];
  pixel_t exp_px [NFRAMES][NPIX];
  bit     exp_oob [NFRAMES][NPIX];
  real    e_cx [NFRAMES], e_cy [NFRAMES], e_rx [NFRAMES], e_ry [NFRAMES];
  longint e_sum [NFRAMES], e_in [NFRAMES];
  int     e_pk [NFRAMES], e_pr [NFRAMES], e_pc [NFRAMES];
  int     n_changed = 0;

  function automatic bit filter_on(int f);
    return f != 0;
  endfunction

  function automatic int map_x(int f, int i);
    return i % COLS;
  endfunction

  function automatic int map_y(int f, int i);
    int r, c;
    r = i / COLS;
    c = i % COLS;
    return (f == 1) ? r + (c - COLS / 2) / SHEAR : r;
  endfunction

  task automatic build_frame(int f);
    int pr, pc;
    real s, sx, sy, sxx, syy;
    int best;
    pr = ROWS * 11 / 20;
    pc = COLS * 4 / 7;
    for (int i = 0; i < NPIX; i++) begin
      int r, c, d;
      r = i / COLS;
      c = i % COLS;
      d = ((r - pr) * (r - pr) + (c - pc) * (c - pc)) * 400 / (COLS * COLS / 16 + 1);
      src[f][i] = pixel_t'((d < 200 ? 200 - d : 0) + $urandom_range(0, 20));
      if (f == 1 && $urandom_range(0, 99) == 0) src[f][i] = 8'd255;
      if (f == 2) src[f][i] = 8'd0;
    end
    // median stage (border pixels pass through)
    for (int i = 0; i < NPIX; i++) begin
      int r, c;
      pixel_t w [9];
      r = i / COLS;
      c = i % COLS;
      flt[i] = src[f][i];
      if (filter_on(f) && r >= 2 && c >= 2) begin
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) w[a*3+b] = src[f][(r-2+a)*COLS + c-2+b];
        w.sort();
        flt[i] = w[4];
        if (flt[i] != src[f][i]) n_changed++;
      end
    end
    // remap stage
    for (int i = 0; i < NPIX; i++) begin
      int r, sx_, sy_;
      r = i / COLS;
      sx_ = map_x(f, i);
      sy_ = map_y(f, i);
      exp_oob[f][i] = !(sx_ >= 0 && sx_ < COLS && sy_ >= 0 && sy_ < ROWS &&
                        sy_ >= r - (HALF - 1) && sy_ <= r + (HALF - 1));
      exp_px[f][i] = exp_oob[f][i] ? 8'd0 : flt[sy_ * COLS + sx_];
    end
    // statistics on the corrected image
    s = 0; sx = 0; sy = 0; sxx = 0; syy = 0;
    e_sum[f] = 0; e_in[f] = 0;
    for (int i = 0; i < NPIX; i++) begin
      real m, n, p;
      int r, c;
      r = i / COLS;
      c = i % COLS;
      p = real'(exp_px[f][i]);
      m = real'(c + 1);
      n = real'(r + 1);
      s += p; sx += m * p; sy += n * p; sxx += m * m * p; syy += n * n * p;
      e_sum[f] += exp_px[f][i];
      if (r >= FP_T && r <= FP_B && c >= FP_L && c <= FP_R) e_in[f] += exp_px[f][i];
    end
    if (s > 0) begin
      e_cx[f] = sx / s;
      e_cy[f] = sy / s;
      e_rx[f] = $sqrt(sxx / s - e_cx[f] * e_cx[f] + 1e-12);
      e_ry[f] = $sqrt(syy / s - e_cy[f] * e_cy[f] + 1e-12);
    end else begin
      e_cx[f] = 0; e_cy[f] = 0; e_rx[f] = 0; e_ry[f] = 0;
    end
    // peak: column sums then row windows, strict maximum in raster order
    best = -1;
    begin
      int colsum [COLS];
      for (int r = WIN - 1; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          colsum[c] = 0;
          for (int k = 0; k < WIN; k++) colsum[c] += exp_px[f][(r - k) * COLS + c];
        end
        for (int c = WIN - 1; c < COLS; c++) begin
          int ws;
          ws = 0;
          for (int k = 0; k < WIN; k++) ws += colsum[c - k];
          if (ws > best) begin
            best = ws;
            e_pr[f] = r - WIN + 1 + WIN / 2;
            e_pc[f] = c - WIN + 1 + WIN / 2;
          end
        end
      end
    end
    e_pk[f] = best;
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_bypass_px = 0, n_filter_px = 0, n_stall = 0, n_oob = 0, n_hold = 0;
  int n_empty = 0, n_in_pos = 0, n_out_pos = 0;

  // source stream
  initial begin
    in_valid = 1'b0;
    in_pix = '0;
    median_en = 1'b0;
    fp_top = RW'(FP_T); fp_bottom = RW'(FP_B); fp_left = CW'(FP_L); fp_right = CW'(FP_R);
    for (int f = 0; f < NFRAMES; f++) build_frame(f);
    wait (rst_n);
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < NPIX; i++) begin
        in_valid    = 1'b1;
        median_en   = filter_on(f);
        in_pix.data = src[f][i];
        in_pix.sof  = (i == 0);
        in_pix.eol  = (i % COLS == COLS - 1);
        do @(posedge clk); while (!in_ready);
        if (median_en) n_filter_px++; else n_bypass_px++;
        #1;
      end
    in_valid = 1'b0;
  end

  // map stream
  initial begin
    map_valid = 1'b0;
    map = '0;
    wait (rst_n);
    for (int f = 0; f < NFRAMES; f++)
      for (int i = 0; i < NPIX; i++) begin
        map_valid = 1'b1;
        map.src_x = MAP_W'(map_x(f, i));
        map.src_y = MAP_W'(map_y(f, i));
        do @(posedge clk); while (!map_ready);
        #1;
      end
    map_valid = 1'b0;
  end

  int n_out = 0;
  longint t_first0, t_last0;
  always @(negedge clk)
    out_ready = (n_out >= NPIX && n_out < 2 * NPIX) ? ($urandom_range(0, 3) != 0) : 1'b1;

  // pixel checker
  always @(posedge clk) begin
    if (rst_n) begin
      if (remap_stall) n_stall++;
      if (out_valid && !out_ready) n_hold++;
      if (out_valid && out_ready) begin
        int f, i;
        f = n_out / NPIX;
        i = n_out % NPIX;
        checks++;
        if (out_pix.data !== exp_px[f][i] || out_oob !== exp_oob[f][i] ||
            out_pix.sof !== (i == 0) || out_pix.eol !== (i % COLS == COLS - 1)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d pixel %0d: got %0d/%0d expected %0d/%0d", f, i,
                     out_pix.data, out_oob, exp_px[f][i], exp_oob[f][i]);
        end
        if (out_oob) n_oob++;
        if (f == 0 && i == 0) t_first0 = cyc;
        if (f == 0 && i == NPIX - 1) t_last0 = cyc;
        n_out++;
      end
    end
  end

  function automatic void near(string what, int f, real got, real want);
    checks++;
    if (got - want > 1.0 / 16384 || want - got > 1.0 / 16384) begin
      failures++;
      $display("frame %0d %s: got %f expected %f", f, what, got, want);
    end
  endfunction

  // frame result checkers
  int n_cen = 0, n_fp = 0, n_pk = 0;
  always @(posedge clk) begin
    if (rst_n && cen_valid) begin
      real sc;
      sc = real'(1 << FRAC);
      checks += 2;
      if (longint'(cen_sum) != e_sum[n_cen]) begin
        failures++;
        $display("frame %0d centroid sum %0d expected %0d", n_cen, cen_sum, e_sum[n_cen]);
      end
      if (cen_empty != (e_sum[n_cen] == 0)) failures++;
      if (cen_empty) n_empty++;
      near("cx", n_cen, real'(cen_x) / sc, e_cx[n_cen]);
      near("cy", n_cen, real'(cen_y) / sc, e_cy[n_cen]);
      near("rms_x", n_cen, real'(cen_rms_x) / sc, e_rx[n_cen]);
      near("rms_y", n_cen, real'(cen_rms_y) / sc, e_ry[n_cen]);
      $display("frame %0d: centroid (%f, %f) rms (%f, %f) sum %0d", n_cen,
               real'(cen_x) / sc, real'(cen_y) / sc, real'(cen_rms_x) / sc,
               real'(cen_rms_y) / sc, cen_sum);
      n_cen++;
    end
    if (rst_n && fp_valid) begin
      checks += 3;
      if (longint'(fp_total) != e_sum[n_fp]) failures++;
      if (longint'(fp_inside) != e_in[n_fp]) failures++;
      if (longint'(fp_outside) != e_sum[n_fp] - e_in[n_fp]) failures++;
      if (fp_inside > 0) n_in_pos++;
      if (fp_outside > 0) n_out_pos++;
      $display("frame %0d: footprint total %0d inside %0d outside %0d", n_fp,
               fp_total, fp_inside, fp_outside);
      n_fp++;
    end
    if (rst_n && pk_valid) begin
      longint em;
      em = (longint'(e_pk[n_pk]) << FRAC) / (WIN * WIN);
      checks += 4;
      if (int'(pk_sum) != e_pk[n_pk]) failures++;
      if (longint'(pk_mean) != em) failures++;
      if (int'(pk_row) != e_pr[n_pk]) failures++;
      if (int'(pk_col) != e_pc[n_pk]) failures++;
      $display("frame %0d: peak mean %f at row %0d col %0d (expected %f at %0d, %0d)", n_pk,
               real'(pk_mean) / real'(1 << FRAC), pk_row, pk_col,
               real'(e_pk[n_pk]) / real'(WIN * WIN), e_pr[n_pk], e_pc[n_pk]);
      n_pk++;
    end
  end

  function automatic void mech(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", what);
    end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_out == NFRAMES * NPIX);
    repeat (600) @(posedge clk);
    checks += 4;
    if (n_cen != NFRAMES || n_fp != NFRAMES || n_pk != NFRAMES) begin
      failures++;
      $display("results: %0d centroid, %0d footprint, %0d peak", n_cen, n_fp, n_pk);
    end
    // an undisturbed frame leaves the chain at one pixel per clock
    if (t_last0 - t_first0 != NPIX - 1) begin
      failures++;
      $display("frame 0 took %0d clocks for %0d pixels", t_last0 - t_first0 + 1, NPIX);
    end
    if (n_changed == 0) failures++;
    if (n_pk != NFRAMES) failures++;
    mech("median filter on", n_filter_px);
    mech("median filter bypass", n_bypass_px);
    mech("noise pixels replaced", n_changed);
    mech("remap buffer-full stall", n_stall);
    mech("remap black fill", n_oob);
    mech("output back-pressure", n_hold);
    mech("empty frame", n_empty);
    mech("beam inside footprint", n_in_pos);
    mech("beam outside footprint", n_out_pos);
    $display("frame 0 rate: %0d pixels in %0d clocks", NPIX, t_last0 - t_first0 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
