// tb_centroid - self-checking test of the centroid / RMS block.
//
// Streams 24x16 frames back to back (a blurred spot at a random place on a
// noisy background, a frame with one lit pixel, an all-black frame, random
// full-scale noise) and checks sum, Cx, Cy, RMSx and RMSy against values
// computed here in double precision from the defining formulas with 1-based
// coordinates. The fixed-point outputs are truncations, so each must lie
// within 2^-14 of the reference. The result must appear no later than
// LAT_MAX clocks after the frame's last pixel.
module tb_centroid;
  import bvid_pkg::*;

  localparam int COLS = 24;
  localparam int ROWS = 16;
  localparam int FRAC = 16;
  localparam int NPIX = COLS * ROWS;
  localparam int XW = $clog2(COLS + 1);
  localparam int YW = $clog2(ROWS + 1);
  localparam int SW = PIX_W + $clog2(COLS * ROWS + 1);
  localparam int LAT_MAX = 200;
  localparam int NFRAMES = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  pix_t in_pix;
  logic res_valid, empty;
  logic [SW-1:0]      sum;
  logic [XW+FRAC-1:0] cx, rms_x;
  logic [YW+FRAC-1:0] cy, rms_y;
  int checks = 0, failures = 0;

  centroid #(.COLS(COLS), .ROWS(ROWS), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference results of each frame, filled when the frame is generated
  real    r_cx [NFRAMES], r_cy [NFRAMES], r_rx [NFRAMES], r_ry [NFRAMES];
  longint r_s [NFRAMES];
  int     t_last [NFRAMES];
  int     n_res = 0;
  int     cyc = 0;
  pixel_t img [NPIX];

  always @(negedge clk) cyc++;

  task automatic make_frame(int f);
    real s, sx, sy, sxx, syy;
    int  px, py;
    px = $urandom_range(3, COLS - 4);
    py = $urandom_range(3, ROWS - 4);
    for (int i = 0; i < NPIX; i++) begin
      int c, r, d;
      c = i % COLS;
      r = i / COLS;
      d = (c - px) * (c - px) + (r - py) * (r - py);
      case (f % 4)
        0: img[i] = pixel_t'((d < 20 ? 200 - 9 * d : 0) + $urandom_range(0, 15));
        1: img[i] = (c == px && r == py) ? 8'd77 : 8'd0;
        2: img[i] = 8'd0;
        default: img[i] = pixel_t'($urandom_range(0, 255));
      endcase
    end
    s = 0; sx = 0; sy = 0; sxx = 0; syy = 0;
    for (int i = 0; i < NPIX; i++) begin
      real m, n;
      m = real'(i % COLS + 1);
      n = real'(i / COLS + 1);
      s   += img[i];
      sx  += m * img[i];
      sy  += n * img[i];
      sxx += m * m * img[i];
      syy += n * n * img[i];
    end
    r_s[f] = longint'(s);
    if (s > 0) begin
      r_cx[f] = sx / s;
      r_cy[f] = sy / s;
      r_rx[f] = $sqrt(sxx / s - r_cx[f] * r_cx[f] + 1e-12);
      r_ry[f] = $sqrt(syy / s - r_cy[f] * r_cy[f] + 1e-12);
    end else begin
      r_cx[f] = 0; r_cy[f] = 0; r_rx[f] = 0; r_ry[f] = 0;
    end
  endtask

  function automatic void check_val(string what, real got, real exp_v);
    checks++;
    if (got - exp_v > 1.0 / 16384 || exp_v - got > 1.0 / 16384) begin
      failures++;
      $display("frame %0d %s: got %f expected %f", n_res, what, got, exp_v);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      real sc;
      sc = real'(1 << FRAC);
      checks++;
      if (longint'(sum) != r_s[n_res]) begin
        failures++;
        $display("frame %0d sum %0d expected %0d", n_res, sum, r_s[n_res]);
      end
      checks++;
      if (empty != (r_s[n_res] == 0)) failures++;
      check_val("cx", real'(cx) / sc, r_cx[n_res]);
      check_val("cy", real'(cy) / sc, r_cy[n_res]);
      check_val("rms_x", real'(rms_x) / sc, r_rx[n_res]);
      check_val("rms_y", real'(rms_y) / sc, r_ry[n_res]);
      checks++;
      if (cyc - t_last[n_res] > LAT_MAX) begin
        failures++;
        $display("frame %0d result after %0d clocks", n_res, cyc - t_last[n_res]);
      end
      n_res++;
    end
  end

  initial begin
    in_valid = 1'b0;
    in_pix = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      make_frame(f);
      for (int i = 0; i < NPIX; i++) begin
        // gaps only in odd frames; even frames follow back to back
        if (f % 2 == 1) while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        in_valid    = 1'b1;
        in_pix.data = img[i];
        in_pix.sof  = (i == 0);
        in_pix.eol  = (i % COLS == COLS - 1);
        @(posedge clk);
        if (i == NPIX - 1) t_last[f] = cyc;
        #1;
      end
    end
    in_valid = 1'b0;
    repeat (LAT_MAX + 10) @(posedge clk);
    checks++;
    if (n_res != NFRAMES) begin
      failures++;
      $display("%0d results for %0d frames", n_res, NFRAMES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
