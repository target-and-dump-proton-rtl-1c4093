// tb_footprint_sum - self-checking test of the footprint sums.
//
// Streams 20x14 frames of random pixels with a new random rectangle for each
// frame (including an empty one, bottom above top, and one covering the whole
// frame), changing the border inputs in the middle of a frame to check that
// the values sampled at the frame start are kept. sum_total, sum_in and sum_out
// are compared with sums computed here; the result must come one clock after
// the last pixel.
module tb_footprint_sum;
  import bvid_pkg::*;

  localparam int COLS = 20;
  localparam int ROWS = 14;
  localparam int NPIX = COLS * ROWS;
  localparam int CW = $clog2(COLS);
  localparam int RW = $clog2(ROWS);
  localparam int SW = PIX_W + $clog2(COLS * ROWS + 1);
  localparam int NFRAMES = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [RW-1:0] top, bottom;
  logic [CW-1:0] left, right;
  logic in_valid;
  pix_t in_pix;
  logic res_valid;
  logic [SW-1:0] sum_total, sum_in, sum_out;
  int checks = 0, failures = 0;

  footprint_sum #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    in_pix = '0;
    top = '0; bottom = '0; left = '0; right = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFRAMES; f++) begin
      int t, b, l, r;
      longint e_t, e_i;
      pixel_t p;
      t = $urandom_range(0, ROWS - 1);
      b = $urandom_range(t, ROWS - 1);
      l = $urandom_range(0, COLS - 1);
      r = $urandom_range(l, COLS - 1);
      if (f == 1) begin t = 5; b = 3; end                    // empty rectangle
      if (f == 2) begin t = 0; b = ROWS - 1; l = 0; r = COLS - 1; end
      top = RW'(t); bottom = RW'(b); left = CW'(l); right = CW'(r);
      e_t = 0; e_i = 0;
      for (int i = 0; i < NPIX; i++) begin
        int c, rr;
        c  = i % COLS;
        rr = i / COLS;
        p  = pixel_t'($urandom_range(0, 255));
        e_t += p;
        if (rr >= t && rr <= b && c >= l && c <= r) e_i += p;
        if ((f % 3) == 0) while ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          @(posedge clk); #1;
        end
        in_valid    = 1'b1;
        in_pix.data = p;
        in_pix.sof  = (i == 0);
        in_pix.eol  = (c == COLS - 1);
        @(posedge clk); #1;
        if (i == NPIX / 2) begin
          // borders move mid-frame: must not affect this frame
          top = RW'($urandom_range(0, ROWS - 1));
          left = CW'($urandom_range(0, COLS - 1));
        end
        checks++;
        if (res_valid !== (i == NPIX - 1)) begin
          failures++;
          $display("frame %0d pixel %0d: res_valid %0d", f, i, res_valid);
        end
      end
      checks += 3;
      if (longint'(sum_total) != e_t)   begin failures++; $display("sum_total %0d exp %0d", sum_total, e_t); end
      if (longint'(sum_in) != e_i)  begin failures++; $display("sum_in %0d exp %0d", sum_in, e_i); end
      if (longint'(sum_out) != e_t - e_i) begin failures++; $display("sum_out %0d", sum_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
