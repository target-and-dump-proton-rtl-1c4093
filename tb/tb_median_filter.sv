// tb_median_filter - self-checking test of the 3x3 median filter.
//
// Streams three 16x12 frames of random pixels with popcorn noise: filter on,
// filter off (bypass), filter on again with random input gaps and random
// output back-pressure. Every output pixel is compared with a reference
// median computed here by sorting the nine window values. A fourth, gap-free
// frame checks the rate: one pixel per clock, first output one clock after the
// first input.
module tb_median_filter;
  import bvid_pkg::*;

  localparam int COLS = 16;
  localparam int ROWS = 12;
  localparam int NPIX = COLS * ROWS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic in_valid, in_ready, out_valid, out_ready;
  pix_t in_pix, out_pix;
  int   checks = 0, failures = 0;

  pixel_t img [ROWS][COLS];
  pixel_t expected [NPIX];
  int     n_out;
  bit     random_stall;
  int     t_first_in, t_first_out, t_last_out, cyc;

  always @(negedge clk) cyc++;

  median_filter #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t ref_median(int r, int c);
    pixel_t s [9];
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        s[i*3+j] = img[r-2+i][c-2+j];
    s.sort();
    return s[4];
  endfunction

  task automatic make_frame();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = pixel_t'(60 + r * 4 + c * 3 + $urandom_range(0, 6));
        if ($urandom_range(0, 9) == 0) img[r][c] = ($urandom_range(0, 1) != 0) ? 8'd255 : 8'd0;
      end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        expected[r*COLS+c] = (en && r >= 2 && c >= 2) ? ref_median(r, c) : img[r][c];
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_pix.data !== expected[n_out] ||
          out_pix.sof  !== (n_out == 0) ||
          out_pix.eol  !== ((n_out % COLS) == COLS - 1)) begin
        failures++;
        if (failures < 10)
          $display("mismatch at %0d: got %0d exp %0d", n_out, out_pix.data, expected[n_out]);
      end
      if (n_out == NPIX - 1) t_last_out = cyc;
      n_out++;
    end
  end

  always @(negedge clk) out_ready = random_stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic send_frame(bit gaps);
    n_out = 0;
    for (int i = 0; i < NPIX; i++) begin
      if (gaps) while ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        @(posedge clk); #1;
      end
      in_valid    = 1'b1;
      in_pix.data = img[i / COLS][i % COLS];
      in_pix.sof  = (i == 0);
      in_pix.eol  = ((i % COLS) == COLS - 1);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 1'b0;
    while (n_out < NPIX) @(posedge clk);
    #1;
  endtask


  initial begin
    in_valid = 1'b0;
    in_pix = '0;
    en = 1'b1;
    random_stall = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // frame 1: filter on
    make_frame();
    send_frame(1'b0);
    // frame 2: bypass
    en = 1'b0;
    make_frame();
    send_frame(1'b0);
    // frame 3: filter on, gaps and back-pressure
    en = 1'b1;
    random_stall = 1'b1;
    make_frame();
    send_frame(1'b1);
    random_stall = 1'b0;
    // frame 4: rate check
    make_frame();
    fork
      begin
        @(posedge clk iff (in_valid && in_ready));
        t_first_in = cyc;
      end
      begin
        @(posedge clk iff out_valid);
        t_first_out = cyc;
      end
    join_none
    send_frame(1'b0);
    checks++;
    if (t_first_out - t_first_in != 1) begin
      failures++;
      $display("latency %0d, expected 1", t_first_out - t_first_in);
    end
    checks++;
    if (t_last_out - t_first_out != NPIX - 1) begin
      failures++;
      $display("frame took %0d clocks, expected %0d", t_last_out - t_first_out + 1, NPIX);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
