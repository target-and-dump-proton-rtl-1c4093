// centroid - beam centroid and RMS width of each frame.
//
// For every pixel P at 1-based column m and row n the block accumulates
//   S = sum P,  Sx = sum m*P,  Sy = sum n*P,  Sxx = sum m*m*P,  Syy = sum n*n*P
// (the same sums, in the same 1-based coordinates, as the source design).
// After the last pixel of the frame the sums are copied into a result engine
// and the accumulators start on the next frame at once, so frames can follow
// each other back to back. The engine computes
//   Cx   = Sx / S
//   RMSx = sqrt(Sxx/S - Cx^2) = sqrt((S*Sxx - Sx*Sx) / S^2)
// and likewise for y. The source design does this in single-precision float;
// this design uses exact integer arithmetic instead: the variance is formed
// as the integer S*Sxx - Sx^2 over S^2, so no rounding enters before the final
// truncation. Results are unsigned fixed point with FRAC fraction bits,
// truncated (floor). Four serial dividers run in parallel, then two serial
// square roots; a frame's result is ready about NUM_W + IN_W/2 clocks after
// its last pixel (about 150 clocks at 720x576, FRAC 16).
//
// Interface: in_valid/in_pix observe a pixel stream (a tap: every cycle with
// in_valid high is taken as an accepted pixel; there is no back-pressure).
// sof re-aligns the position counters to (0,0). res_valid pulses for one clock
// when sum, cx, cy, rms_x, rms_y hold a new frame's result; they stay until
// the next one. empty is set with the result when the frame summed to zero,
// and then cx..rms_y are zero. A frame must be longer than the engine's run
// (checked by an assertion).
module centroid
  import bvid_pkg::*;
#(
  parameter int COLS = 720,
  parameter int ROWS = 576,
  parameter int FRAC = 16,
  localparam int XW   = $clog2(COLS + 1),
  localparam int YW   = $clog2(ROWS + 1),
  localparam int SW   = PIX_W + $clog2(COLS * ROWS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pix_t                 in_pix,
  output logic                 res_valid,
  output logic                 empty,
  output logic [SW-1:0]        sum,
  output logic [XW+FRAC-1:0]   cx,
  output logic [YW+FRAC-1:0]   cy,
  output logic [XW+FRAC-1:0]   rms_x,
  output logic [YW+FRAC-1:0]   rms_y
);

  localparam int CW   = $clog2(COLS);
  localparam int RW   = $clog2(ROWS);
  localparam int X1W  = SW + XW;
  localparam int X2W  = SW + 2 * XW;
  localparam int Y1W  = SW + YW;
  localparam int Y2W  = SW + 2 * YW;
  // variance numerators S*Sxx - Sx^2, shifted left by 2*FRAC
  localparam int VXW  = SW + X2W + 2 * FRAC;
  localparam int VYW  = SW + Y2W + 2 * FRAC;

  // ---------------------------------------------------------------- position
  logic [CW-1:0] col, cur_col;
  logic [RW-1:0] row, cur_row;
  logic          first_px, last_px;

  always_comb begin
    cur_col  = in_pix.sof ? '0 : col;
    cur_row  = in_pix.sof ? '0 : row;
    first_px = (cur_col == '0) && (cur_row == '0);
    last_px  = (cur_col == CW'(COLS - 1)) && (cur_row == RW'(ROWS - 1));
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

  // ------------------------------------------------------------ accumulation
  logic [XW-1:0]  m;
  logic [YW-1:0]  n;
  logic [SW-1:0]  acc_s,  nxt_s;
  logic [X1W-1:0] acc_x1, nxt_x1;
  logic [X2W-1:0] acc_x2, nxt_x2;
  logic [Y1W-1:0] acc_y1, nxt_y1;
  logic [Y2W-1:0] acc_y2, nxt_y2;

  always_comb begin
    m      = XW'(cur_col) + 1'b1;
    n      = YW'(cur_row) + 1'b1;
    nxt_s  = (first_px ? '0 : acc_s)  + SW'(in_pix.data);
    nxt_x1 = (first_px ? '0 : acc_x1) + X1W'(m) * X1W'(in_pix.data);
    nxt_x2 = (first_px ? '0 : acc_x2) + X2W'(m) * X2W'(m) * X2W'(in_pix.data);
    nxt_y1 = (first_px ? '0 : acc_y1) + Y1W'(n) * Y1W'(in_pix.data);
    nxt_y2 = (first_px ? '0 : acc_y2) + Y2W'(n) * Y2W'(n) * Y2W'(in_pix.data);
  end

  // frame sums handed to the result engine
  logic [SW-1:0]  f_s;
  logic [X1W-1:0] f_x1;
  logic [X2W-1:0] f_x2;
  logic [Y1W-1:0] f_y1;
  logic [Y2W-1:0] f_y2;
  logic           frame_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0; acc_x1 <= '0; acc_x2 <= '0; acc_y1 <= '0; acc_y2 <= '0;
      f_s   <= '0; f_x1   <= '0; f_x2   <= '0; f_y1   <= '0; f_y2   <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (in_valid) begin
        acc_s  <= nxt_s;
        acc_x1 <= nxt_x1;
        acc_x2 <= nxt_x2;
        acc_y1 <= nxt_y1;
        acc_y2 <= nxt_y2;
        if (last_px) begin
          f_s  <= nxt_s;
          f_x1 <= nxt_x1;
          f_x2 <= nxt_x2;
          f_y1 <= nxt_y1;
          f_y2 <= nxt_y2;
          frame_done <= 1'b1;
        end
      end
    end
  end

  // ----------------------------------------------------------- result engine
  typedef enum logic [2:0] {E_IDLE, E_PREP, E_DIV, E_SQRT, E_OUT} eng_t;
  eng_t state;

  logic [VXW-1:0] vnum_x;
  logic [VYW-1:0] vnum_y;
  logic [2*SW-1:0] s_sq;
  logic            div_start, sqrt_start;
  logic [X1W+FRAC-1:0] q_cx;
  logic [Y1W+FRAC-1:0] q_cy;
  logic [VXW-1:0]  q_vx;
  logic [VYW-1:0]  q_vy;
  logic [3:0]      div_done_seen;
  logic [1:0]      sqrt_done_seen;
  logic [3:0]      div_done;
  logic [1:0]      sqrt_done;
  logic [3:0]      div_busy;
  logic [1:0]      sqrt_busy;
  logic [XW+FRAC-1:0] root_x;
  logic [YW+FRAC-1:0] root_y;
  logic [SW-1:0]   rem_cx, rem_cy;
  logic [2*SW-1:0] rem_vx, rem_vy;

  seq_div #(.NUM_W(X1W + FRAC), .DEN_W(SW)) u_div_cx (
    .clk, .rst_n, .start(div_start), .num({f_x1, FRAC'(0)}), .den(f_s),
    .busy(div_busy[0]), .done(div_done[0]), .quo(q_cx), .rem(rem_cx));
  seq_div #(.NUM_W(Y1W + FRAC), .DEN_W(SW)) u_div_cy (
    .clk, .rst_n, .start(div_start), .num({f_y1, FRAC'(0)}), .den(f_s),
    .busy(div_busy[1]), .done(div_done[1]), .quo(q_cy), .rem(rem_cy));
  seq_div #(.NUM_W(VXW), .DEN_W(2 * SW)) u_div_vx (
    .clk, .rst_n, .start(div_start), .num(vnum_x), .den(s_sq),
    .busy(div_busy[2]), .done(div_done[2]), .quo(q_vx), .rem(rem_vx));
  seq_div #(.NUM_W(VYW), .DEN_W(2 * SW)) u_div_vy (
    .clk, .rst_n, .start(div_start), .num(vnum_y), .den(s_sq),
    .busy(div_busy[3]), .done(div_done[3]), .quo(q_vy), .rem(rem_vy));

  // the variance is below (COLS/2)^2, so its low 2*(XW+FRAC) bits hold it
  isqrt #(.IN_W(2 * (XW + FRAC))) u_sqrt_x (
    .clk, .rst_n, .start(sqrt_start), .rad(q_vx[2*(XW+FRAC)-1:0]),
    .busy(sqrt_busy[0]), .done(sqrt_done[0]), .root(root_x));
  isqrt #(.IN_W(2 * (YW + FRAC))) u_sqrt_y (
    .clk, .rst_n, .start(sqrt_start), .rad(q_vy[2*(YW+FRAC)-1:0]),
    .busy(sqrt_busy[1]), .done(sqrt_done[1]), .root(root_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= E_IDLE;
      vnum_x         <= '0;
      vnum_y         <= '0;
      s_sq           <= '0;
      div_start      <= 1'b0;
      sqrt_start     <= 1'b0;
      div_done_seen  <= '0;
      sqrt_done_seen <= '0;
      res_valid      <= 1'b0;
      empty          <= 1'b0;
      sum            <= '0;
      cx             <= '0;
      cy             <= '0;
      rms_x          <= '0;
      rms_y          <= '0;
    end else begin
      div_start  <= 1'b0;
      sqrt_start <= 1'b0;
      res_valid  <= 1'b0;
      unique case (state)
        E_IDLE: if (frame_done) state <= E_PREP;
        E_PREP: begin
          // Cauchy-Schwarz keeps S*Sxx - Sx^2 non-negative
          vnum_x    <= {VXW'(f_s) * VXW'(f_x2) - VXW'(f_x1) * VXW'(f_x1)} << (2 * FRAC);
          vnum_y    <= {VYW'(f_s) * VYW'(f_y2) - VYW'(f_y1) * VYW'(f_y1)} << (2 * FRAC);
          s_sq      <= (2*SW)'(f_s) * (2*SW)'(f_s);
          div_done_seen <= '0;
          if (f_s == '0) begin
            state <= E_OUT;
          end else begin
            div_start <= 1'b1;
            state     <= E_DIV;
          end
        end
        E_DIV: begin
          if (&(div_done_seen | div_done)) begin
            sqrt_start     <= 1'b1;
            sqrt_done_seen <= '0;
            state          <= E_SQRT;
          end else begin
            div_done_seen <= div_done_seen | div_done;
          end
        end
        E_SQRT: begin
          if (&(sqrt_done_seen | sqrt_done)) state <= E_OUT;
          else sqrt_done_seen <= sqrt_done_seen | sqrt_done;
        end
        E_OUT: begin
          res_valid <= 1'b1;
          sum       <= f_s;
          empty     <= (f_s == '0);
          cx        <= (f_s == '0) ? '0 : q_cx[XW+FRAC-1:0];
          cy        <= (f_s == '0) ? '0 : q_cy[YW+FRAC-1:0];
          rms_x     <= (f_s == '0) ? '0 : root_x;
          rms_y     <= (f_s == '0) ? '0 : root_y;
          state     <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  // the frame sums must not change while the engine still reads them
  assert property (@(posedge clk) disable iff (!rst_n)
                   frame_done |-> state == E_IDLE);

endmodule
