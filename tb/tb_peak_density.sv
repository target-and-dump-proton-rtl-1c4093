// tb_peak_density - self-checking test of the peak density search.
//
// Uses the 10x10 window of the source design on 32x24 frames: random spots
// on noise, a spot against each corner, and a flat frame where all windows
// tie and the first one must win. For every frame a brute-force search here
// finds the largest window sum, its centre and the truncated fixed-point mean
// sum*2^FRAC/(WIN*WIN); all four outputs are compared. The result must come
// within LAT_MAX clocks of the frame's last pixel. Odd frames have random
// input gaps.
module tb_peak_density;
  import bvid_pkg::*;

  localparam int COLS = 32;
  localparam int ROWS = 24;
  localparam int WIN  = 10;
  localparam int FRAC = 16;
  localparam int NPIX = COLS * ROWS;
  localparam int CW = $clog2(COLS);
  localparam int RW = $clog2(ROWS);
  localparam int WSW = PIX_W + $clog2(WIN * WIN + 1);
  localparam int LAT_MAX = 40;
  localparam int NFRAMES = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  pix_t in_pix;
  logic res_valid;
  logic [WSW-1:0] peak_sum;
  logic [PIX_W+FRAC-1:0] peak_mean;
  logic [RW-1:0] peak_row;
  logic [CW-1:0] peak_col;
  int checks = 0, failures = 0;

  peak_density #(.COLS(COLS), .ROWS(ROWS), .WIN(WIN), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pixel_t img [ROWS][COLS];
  int     e_sum [NFRAMES], e_row [NFRAMES], e_col [NFRAMES], t_last [NFRAMES];
  int     n_res = 0, cyc = 0;

  always @(negedge clk) cyc++;

  task automatic make_frame(int f);
    int pr, pc, best;
    pr = $urandom_range(0, ROWS - 1);
    pc = $urandom_range(0, COLS - 1);
    if (f == 1) begin pr = 0; pc = 0; end
    if (f == 2) begin pr = ROWS - 1; pc = COLS - 1; end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int d;
        d = (r - pr) * (r - pr) + (c - pc) * (c - pc);
        img[r][c] = pixel_t'((d < 40 ? 220 - 5 * d : 0) + $urandom_range(0, 30));
        if (f == 3) img[r][c] = 8'd99;
      end
    best = -1;
    for (int r = WIN - 1; r < ROWS; r++)
      for (int c = WIN - 1; c < COLS; c++) begin
        int s;
        s = 0;
        for (int i = 0; i < WIN; i++)
          for (int j = 0; j < WIN; j++) s += img[r-i][c-j];
        if (s > best) begin
          best = s;
          e_row[f] = r - WIN + 1 + WIN / 2;
          e_col[f] = c - WIN + 1 + WIN / 2;
        end
      end
    e_sum[f] = best;
  endtask

  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      longint em;
      em = (longint'(e_sum[n_res]) << FRAC) / (WIN * WIN);
      checks += 5;
      if (int'(peak_sum) != e_sum[n_res]) failures++;
      if (longint'(peak_mean) != em) failures++;
      if (int'(peak_row) != e_row[n_res]) failures++;
      if (int'(peak_col) != e_col[n_res]) failures++;
      if (cyc - t_last[n_res] > LAT_MAX) failures++;
      if (failures > 0 && failures < 10)
        $display("frame %0d: sum %0d/%0d mean %0d/%0d at (%0d,%0d)/(%0d,%0d) after %0d clocks",
                 n_res, peak_sum, e_sum[n_res], peak_mean, em, peak_row, peak_col,
                 e_row[n_res], e_col[n_res], cyc - t_last[n_res]);
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
        if (f % 2 == 1) while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        in_valid    = 1'b1;
        in_pix.data = img[i / COLS][i % COLS];
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
    if (n_res != NFRAMES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
