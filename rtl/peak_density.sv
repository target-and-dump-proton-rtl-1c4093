// peak_density - densest WIN x WIN region of the beam in each frame.
//
// A WIN x WIN window slides over the frame. WIN-1 line buffers hold the
// previous rows, so for each incoming pixel the WIN values of its column
// (the pixel and the WIN-1 above it) are added into a column sum; a shift
// register keeps the last WIN column sums, and their total is the window
// sum whose bottom-right corner is the current pixel. Every complete window
// (one lying wholly inside the frame) is compared with the largest so far;
// a strictly larger one replaces it together with its centre position, so
// on a tie the first window in raster order is kept. Comparing sums is the
// same as comparing means, as all windows have WIN*WIN pixels. After the last
// pixel the largest sum is divided by WIN*WIN in a serial divider to give the
// peak mean density in fixed point with FRAC fraction bits (truncated).
//
// The window, the strict comparison and the stored centre follow the source
// design. The centre of a window with top-left corner (r0, c0) is taken as
// (r0 + WIN/2, c0 + WIN/2) in 0-based coordinates (for even WIN the source
// does not say which of the middle pixels it reports; this is our choice).
//
// Interface: in_valid/in_pix observe an accepted pixel stream (tap, no
// back-pressure), one pixel per clock at most; sof re-aligns the position
// counters to (0,0). Timing: the window sum is registered one clock after
// the pixel; res_valid pulses about FRAC + PIX_W + 2*log2(WIN) + 4 clocks
// after the last pixel of a frame, and peak_sum, peak_mean, peak_row and
// peak_col hold the frame's result until the next.
module peak_density
  import bvid_pkg::*;
#(
  parameter int COLS = 720,
  parameter int ROWS = 576,
  parameter int WIN  = 10,
  parameter int FRAC = 16,
  localparam int CW  = $clog2(COLS),
  localparam int RW  = $clog2(ROWS),
  localparam int WSW = PIX_W + $clog2(WIN * WIN + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  pix_t                  in_pix,
  output logic                  res_valid,
  output logic [WSW-1:0]        peak_sum,
  output logic [PIX_W+FRAC-1:0] peak_mean,
  output logic [RW-1:0]         peak_row,
  output logic [CW-1:0]         peak_col
);

  localparam int CSW = PIX_W + $clog2(WIN + 1);
  localparam int DW  = $clog2(WIN * WIN + 1);

  // ---------------------------------------------------------------- position
  logic [CW-1:0] col, cur_col;
  logic [RW-1:0] row, cur_row;
  logic          first_px, last_px, full_win;

  always_comb begin
    cur_col  = in_pix.sof ? '0 : col;
    cur_row  = in_pix.sof ? '0 : row;
    first_px = (cur_col == '0) && (cur_row == '0);
    last_px  = (cur_col == CW'(COLS - 1)) && (cur_row == RW'(ROWS - 1));
    full_win = (cur_row >= RW'(WIN - 1)) && (cur_col >= CW'(WIN - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      if (cur_col == CW'(COLS - 1)) begin
        col <= '0;
        row <= last_px ? '0 : cur_row + 1'b1;
      end else begin
        col <= cur_col + 1'b1;
        row <= cur_row;
      end
    end
  end

  // ------------------------------------------- stage 0: column sums, buffers
  pixel_t         lb [WIN-1][COLS];   // lb[k]: row - (k+1)
  pixel_t         above [WIN-1];
  logic [CSW-1:0] colsum;
  logic [CSW-1:0] cs_sr [WIN];        // cs_sr[0]: newest column

  always_comb begin
    colsum = CSW'(in_pix.data);
    for (int k = 0; k < WIN - 1; k++) begin
      above[k] = lb[k][cur_col];
      colsum   = colsum + CSW'(above[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb[0][cur_col] <= in_pix.data;
      for (int k = 1; k < WIN - 1; k++) lb[k][cur_col] <= above[k-1];
      cs_sr[0] <= colsum;
      for (int k = 1; k < WIN; k++) cs_sr[k] <= cs_sr[k-1];
    end
  end

  logic          s1_valid, s1_first, s1_last;
  logic [RW-1:0] s1_row;
  logic [CW-1:0] s1_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_row   <= '0;
      s1_col   <= '0;
    end else begin
      s1_valid <= in_valid && full_win;
      s1_first <= in_valid && first_px;
      s1_last  <= in_valid && last_px;
      s1_row   <= cur_row;
      s1_col   <= cur_col;
    end
  end

  // ------------------------------------------- stage 1: window sum, compare
  logic [WSW-1:0] wsum;
  logic [WSW-1:0] max_q, max_n;
  logic [RW-1:0]  prow_q, prow_n;
  logic [CW-1:0]  pcol_q, pcol_n;
  logic           have_q, have_n;

  always_comb begin
    wsum = '0;
    for (int k = 0; k < WIN; k++) wsum = wsum + WSW'(cs_sr[k]);
    have_n = s1_first ? 1'b0 : have_q;
    max_n  = max_q;
    prow_n = prow_q;
    pcol_n = pcol_q;
    if (s1_valid && (!have_n || wsum > max_q)) begin
      have_n = 1'b1;
      max_n  = wsum;
      prow_n = s1_row - RW'(WIN - 1) + RW'(WIN / 2);
      pcol_n = s1_col - CW'(WIN - 1) + CW'(WIN / 2);
    end
  end

  // ----------------------------------------------- frame result and divider
  logic                    div_start, div_busy, div_done;
  logic [WSW+FRAC-1:0]     quo;
  logic [DW-1:0]           rem;
  logic [WSW-1:0]          f_max;
  logic [RW-1:0]           f_row;
  logic [CW-1:0]           f_col;

  seq_div #(.NUM_W(WSW + FRAC), .DEN_W(DW)) u_div (
    .clk, .rst_n, .start(div_start), .num({f_max, FRAC'(0)}), .den(DW'(WIN * WIN)),
    .busy(div_busy), .done(div_done), .quo(quo), .rem(rem));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q    <= 1'b0;
      max_q     <= '0;
      prow_q    <= '0;
      pcol_q    <= '0;
      f_max     <= '0;
      f_row     <= '0;
      f_col     <= '0;
      div_start <= 1'b0;
      res_valid <= 1'b0;
      peak_sum  <= '0;
      peak_mean <= '0;
      peak_row  <= '0;
      peak_col  <= '0;
    end else begin
      have_q    <= have_n;
      max_q     <= max_n;
      prow_q    <= prow_n;
      pcol_q    <= pcol_n;
      div_start <= 1'b0;
      res_valid <= 1'b0;
      if (s1_last) begin
        f_max     <= max_n;
        f_row     <= prow_n;
        f_col     <= pcol_n;
        div_start <= 1'b1;
      end
      if (div_done) begin
        res_valid <= 1'b1;
        peak_sum  <= f_max;
        peak_mean <= quo[PIX_W+FRAC-1:0];
        peak_row  <= f_row;
        peak_col  <= f_col;
      end
    end
  end

  // a new frame result must not arrive while the divider still works
  assert property (@(posedge clk) disable iff (!rst_n) s1_last |-> !div_busy);

endmodule
